// tb_sync_2ff: a random input, changed just after each clock edge, must
// appear on q exactly two clock edges later.
`timescale 1ns/1ps
module tb_sync_2ff;
`include "tb_check.svh"
  logic clk = 0, d = 0, q;
  logic h [$];
  always #5 clk = ~clk;
  sync_2ff dut (.clk(clk), .d(d), .q(q));
  `WATCHDOG(100000)
  initial begin
    repeat (3) @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      h.push_back(d);
      if (h.size() > 2) `CHECK(q == h[h.size() - 2], $sformatf("delay of two at %0d", i))
      d = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
