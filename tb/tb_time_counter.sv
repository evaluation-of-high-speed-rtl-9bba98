// tb_time_counter: done must rise exactly LIMIT reference cycles after reset
// is released, the count must stop there, and a new reset must restart it.
`timescale 1ns/1ps
module tb_time_counter;
`include "tb_check.svh"
  localparam longint unsigned LIMIT = 37;
  logic clk = 0, rst = 0;
  logic [$clog2(LIMIT + 1)-1:0] count;
  logic done;
  always #10 clk = ~clk;
  time_counter #(.LIMIT(LIMIT)) dut (.refclock(clk), .rst(rst), .count(count), .done(done));
  `WATCHDOG(100000)
  initial begin
    int n;
    repeat (2) begin
      #1 rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      `CHECK(!done && count == 0, "cleared by reset")
      n = 0;
      while (!done) begin @(posedge clk); #1; n++; end
      `CHECK(n == LIMIT, $sformatf("window of %0d cycles, expected %0d", n, LIMIT))
      `CHECK(count == LIMIT, "count stops at LIMIT")
      repeat (10) @(posedge clk);
      #1 `CHECK(done && count == LIMIT, "stays done")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
