// tb_xcvr_word_aligner: for every bit offset 0..9 a stream of 8b/10b code
// groups (four K28.5 commas, then random data with a comma now and then) is
// cut into 10-bit words at that offset. With patternalign high until
// syncstatus, the aligner must then give back exactly the original code groups
// one cycle late, with patterndetect on each comma and only there, and stay
// aligned once patternalign is low.
`timescale 1ns/1ps
module tb_xcvr_word_aligner;
`include "tb_check.svh"
  import enc8b10b_pkg::*;
  logic clk = 0, rst = 0, pa = 0;
  logic [9:0] din = 0, dout;
  logic pd, sync;
  always #5 clk = ~clk;
  xcvr_word_aligner dut (.clk(clk), .rst(rst), .din(din), .patternalign(pa),
                         .dout(dout), .patterndetect(pd), .syncstatus(sync));
  localparam int N = 400;
  `WATCHDOG(10000000)
  initial begin
    for (int s = 0; s < 10; s++) begin
      logic [9:0] codes [N];
      logic bits [$];
      logic rd;
      int locked_at;
      rd = 1'b0;
      for (int i = 0; i < N; i++) begin
        logic [10:0] r;
        if (i < 4 || $urandom % 16 == 0) r = encode(8'hBC, 1'b1, rd);
        else r = encode(8'($urandom), 1'b0, rd);
        rd = r[10]; codes[i] = r[9:0];
      end
      bits.delete();
      for (int b = 0; b < s; b++) bits.push_back(1'($urandom));
      for (int i = 0; i < N; i++) for (int b = 0; b < 10; b++) bits.push_back(codes[i][b]);
      while (bits.size() % 10 != 0) bits.push_back(1'b0);
      rst = 0; pa = 1; #2 rst = 1; #10 rst = 0;
      locked_at = -1;
      for (int j = 0; j < bits.size() / 10; j++) begin
        @(negedge clk);
        // state after edge j-1: dout holds codes[j-2]
        if (locked_at >= 0 && j >= locked_at + 2 && j - 2 < N) begin
          `CHECK(dout == codes[j-2], $sformatf("offset %0d word %0d: %h vs %h", s, j-2, dout, codes[j-2]))
          `CHECK(pd == (codes[j-2] == 10'h17C || codes[j-2] == 10'h283), "patterndetect")
          `CHECK(sync, "syncstatus stays")
        end
        if (sync && locked_at < 0) begin locked_at = j; pa = 0; end
        for (int b = 0; b < 10; b++) din[b] = bits[10*j + b];
      end
      `CHECK(locked_at >= 0 && locked_at <= 3, $sformatf("offset %0d locked at word %0d", s, locked_at))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
