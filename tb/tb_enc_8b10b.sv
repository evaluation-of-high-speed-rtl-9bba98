// tb_enc_8b10b: known code groups (K28.5 = 17C / 283, D21.5 = 155,
// D0.0 with RD- = 0B9), then a long random stream of data and the defined
// control characters: every code must have 4, 5 or 6 ones, the running
// disparity of the line must stay within one of zero, no run may be longer than
// five, and the 268 code groups of one disparity must all differ.
`timescale 1ns/1ps
module tb_enc_8b10b;
`include "tb_check.svh"
  logic clk = 0, rst = 0, en = 1, k = 0;
  logic [7:0] d = 0;
  logic [9:0] code;
  logic rd, kerr;
  always #5 clk = ~clk;
  enc_8b10b dut (.clk(clk), .rst(rst), .en(en), .data(d), .k(k), .code(code), .rd(rd), .k_err(kerr));

  task automatic send(input logic [7:0] dd, input logic kk);
    @(negedge clk); d = dd; k = kk;
    @(posedge clk); #1;
  endtask
  function automatic int ones10(input logic [9:0] v);
    int n = 0; for (int i = 0; i < 10; i++) n += v[i]; return n;
  endfunction
  logic [7:0] kset [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                            8'hF7, 8'hFB, 8'hFD, 8'hFE};
  `WATCHDOG(1000000)
  initial begin
    int disp, run, maxrun;
    logic last;
    logic [9:0] seen [logic [9:0]];
    #1 rst = 1; #12 rst = 0;
    send(8'hBC, 1); `CHECK(code == 10'h17C, "K28.5 RD-")
    `CHECK(rd == 1, "RD+ after 17C")
    send(8'hBC, 1); `CHECK(code == 10'h283, "K28.5 RD+")
    send(8'hB5, 0); `CHECK(code == 10'h155, "D21.5")
    rst = 1; #12 rst = 0;
    send(8'h00, 0); `CHECK(code == 10'h0B9, "D0.0 RD-")
    send(8'h1C, 0); `CHECK(kerr == 0, "no k error for data")
    send(8'h01, 1); `CHECK(kerr == 1, "k error for undefined control")
    // random stream
    rst = 1; #12 rst = 0;
    disp = -1; run = 0; maxrun = 0; last = 0;
    for (int i = 0; i < 5000; i++) begin
      if ($urandom % 8 == 0) send(kset[$urandom % 12], 1);
      else send(8'($urandom), 0);
      `CHECK(ones10(code) >= 4 && ones10(code) <= 6, "balance of one code")
      disp += 2 * ones10(code) - 10;
      `CHECK(disp == -1 || disp == 1, $sformatf("running disparity %0d", disp))
      `CHECK((disp > 0) == rd, "rd output")
      for (int b = 0; b < 10; b++) begin
        if (code[b] == last) run++; else run = 1;
        last = code[b];
        if (run > maxrun) maxrun = run;
      end
    end
    `CHECK(maxrun <= 5, $sformatf("run length %0d", maxrun))
    // all data codes in RD- are distinct
    for (int v = 0; v < 256; v++) begin
      rst = 1; #12 rst = 0;
      send(8'(v), 0);
      `CHECK(!seen.exists(code), $sformatf("code of D%0d unique", v))
      seen[code] = code;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
