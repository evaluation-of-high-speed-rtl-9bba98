// tb_lvds_data_gen: the generator must start at 0 after reset and count
// 0..15, wrapping, one value per clock.
`timescale 1ns/1ps
module tb_lvds_data_gen;
`include "tb_check.svh"
  logic clk = 0, rst = 0;
  logic [3:0] d;
  always #4 clk = ~clk;
  lvds_data_gen #(.W(4)) dut (.refclock(clk), .rst(rst), .out_data(d));
  `WATCHDOG(10000)
  initial begin
    #1 rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    `CHECK(d == 0, "zero after reset")
    for (int i = 1; i < 40; i++) begin
      @(posedge clk); #1;
      `CHECK(d == 4'(i), $sformatf("value %0d", i))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
