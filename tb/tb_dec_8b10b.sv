// tb_dec_8b10b: a random stream of bytes and control characters is encoded by
// the encoder and must decode to the same bytes and flags, without errors.
// Then invalid code groups must raise errdetect, and a code of the wrong
// disparity (17C twice in a row) must raise disperr.
`timescale 1ns/1ps
module tb_dec_8b10b;
`include "tb_check.svh"
  logic clk = 0, rst = 0, force_en = 0;
  logic [7:0] d = 0, q;
  logic k = 0, qk, err, derr, rd, kerr;
  logic [9:0] code, force_code, dcode;
  always #5 clk = ~clk;
  enc_8b10b u_enc (.clk(clk), .rst(rst), .en(1'b1), .data(d), .k(k), .code(code), .rd(rd), .k_err(kerr));
  assign dcode = force_en ? force_code : code;
  dec_8b10b dut (.clk(clk), .rst(rst), .en(1'b1), .code(dcode), .data(q), .k(qk),
                 .errdetect(err), .disperr(derr));
  logic [7:0] kset [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                            8'hF7, 8'hFB, 8'hFD, 8'hFE};
  logic [8:0] hist [$];
  `WATCHDOG(1000000)
  initial begin
    #1 rst = 1; #12 rst = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i > 1) begin
        automatic logic [8:0] e = hist.pop_front();
        `CHECK({qk, q} == e, $sformatf("byte %0d: got %b/%h want %b/%h", i, qk, q, e[8], e[7:0]))
        `CHECK(!err && !derr, "no error flags")
      end
      if ($urandom % 6 == 0) begin d = kset[$urandom % 12]; k = 1; end
      else begin d = 8'($urandom); k = 0; end
      hist.push_back({k, d});
    end
    // invalid codes
    @(negedge clk); force_en = 1; force_code = 10'h000;
    @(negedge clk); `CHECK(err, "000 is not a code")
    force_code = 10'h3FF;
    @(negedge clk); `CHECK(err, "3FF is not a code")
    force_code = 10'h0F0;   // 0000111100: c..i? six zeros run
    @(negedge clk); `CHECK(err, "0F0 is not a code")
    // disparity: reset to RD-, then 17C (ok, RD+), then 17C again (wrong)
    rst = 1; #2 rst = 0;
    force_code = 10'h17C;
    @(negedge clk); `CHECK(!err && !derr && qk && q == 8'hBC, "first 17C")
    @(negedge clk); `CHECK(!err && derr && qk && q == 8'hBC, "second 17C is a disparity error")
    force_code = 10'h283;
    @(negedge clk);
    @(negedge clk); `CHECK(!err && derr, "283 twice is a disparity error")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
