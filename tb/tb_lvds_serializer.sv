// tb_lvds_serializer: words are taken on the core clock and must leave MSB
// first, one bit per fast clock, with the forwarded clock rising with each MSB
// and the core clock at fast/4.
`timescale 1ns/1ps
module tb_lvds_serializer;
`include "tb_check.svh"
  logic fast = 0, rst = 0;
  logic [3:0] din;
  logic sout, core, outclk;
  always #1 fast = ~fast;
  lvds_serializer #(.FACTOR(4), .B(4)) dut (.fast_clk(fast), .rst(rst), .tx_in(din),
    .tx_out(sout), .tx_coreclock(core), .tx_outclock(outclk));
  // words written by core-clock logic: a pseudo-random sequence
  logic [3:0] words [256];
  int wi = 0;
  initial for (int i = 0; i < 256; i++) words[i] = 4'($urandom);
  always @(posedge core or posedge rst) if (rst) begin din <= words[0]; wi <= 1; end
                                        else begin din <= words[wi]; wi <= wi + 1; end
  // sample the line: collect bits after each rising forwarded clock
  int nword = 0, nbits = 0, ncore = 0;
  logic [3:0] got;
  logic outclk_q = 0;
  logic [3:0] expq [$];
  always @(posedge core) ncore++;
  // sample the line in the middle of each bit; a rising forwarded clock marks the MSB
  int bi = -1;
  always @(negedge fast) begin
    outclk_q <= outclk;
    if (outclk && !outclk_q) begin bi = 1; got = {3'b0, sout}; end
    else if (bi >= 1 && bi < 4) begin got = {got[2:0], sout}; bi++; end
    if (bi == 4) begin
      nword++;
      if (nword > 2) expq.push_back(got);
      bi = -1;
    end
  end
  `WATCHDOG(100000)
  initial begin
    #1 rst = 1;
    repeat (4) @(posedge fast);
    #0.5 rst = 0;
    #400;
    // consecutive words must be consecutive generator entries
    begin
      int base = -1;
      for (int k = 0; k < 8; k++) if (expq[0] == words[k] && expq[1] == words[k+1] && expq[2] == words[k+2]) base = k;
      `CHECK(base >= 0, "word order found")
      if (base >= 0) for (int j = 0; j < expq.size(); j++)
        `CHECK(expq[j] == words[base + j], $sformatf("in-order word %0d", j))
    end
    `CHECK(ncore > 45 && ncore < 52, $sformatf("core clock = fast/4 (%0d in 400 ns)", ncore))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
