// tb_lvds_master: decodes the master's line with the forwarded clock and checks
// that it carries the 0..15 sequence MSB first, with the forwarded clock at a
// quarter of the bit rate.
`timescale 1ns/1ps
module tb_lvds_master;
`include "tb_check.svh"
  logic fast = 0, rst = 0;
  logic sout, oclk, core;
  always #1 fast = ~fast;
  lvds_master dut (.fast_clk(fast), .rst(rst), .tx_out(sout), .tx_outclk(oclk), .tx_coreclock(core));
  logic oq = 0;
  logic [3:0] got, prevw;
  int bi = -1, nw = 0, nosc = 0;
  always @(posedge oclk) nosc++;
  always @(negedge fast) begin
    oq <= oclk;
    if (oclk && !oq) begin bi = 1; got = {3'b0, sout}; end
    else if (bi >= 1 && bi < 4) begin got = {got[2:0], sout}; bi++; end
    if (bi == 4) begin
      if (nw > 2) `CHECK(got == prevw + 4'd1, $sformatf("word %0d: %h after %h", nw, got, prevw))
      prevw = got; nw++; bi = -1;
    end
  end
  `WATCHDOG(100000)
  initial begin
    #1 rst = 1;
    repeat (3) @(posedge fast);
    #0.5 rst = 0;
    #800;
    `CHECK(nw > 90, "words seen")
    `CHECK(nosc >= 99 && nosc <= 101, $sformatf("forwarded clock periods in 800 ns: %0d", nosc))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
