// tb_lvds_measure: a counting word stream with a few deliberate breaks. Every
// PKT_BITS/4 consecutive good words must add one packet; each break adds one
// error and restarts the packet; nothing is counted after window_done.
// A reference count is kept in the testbench.
`timescale 1ns/1ps
module tb_lvds_measure;
`include "tb_check.svh"
  localparam int PKT = 64;          // 16 words per packet to keep the run short
  logic clk = 0, rst = 0, wdone = 0;
  logic [3:0] d = 0;
  logic [25:0] nok;
  logic [15:0] nerr;
  logic meas;
  always #4 clk = ~clk;
  lvds_measure #(.W(4), .PKT_BITS(PKT)) dut (.clk(clk), .rst(rst), .in_data(d),
    .window_done(wdone), .number_ok(nok), .number_err(nerr), .measuring(meas));
  int ref_ok = 0, ref_err = 0, run = 0;
  logic [3:0] prev;
  bit have = 0;
  // reference model: sees the words on the same edges as the block
  always @(posedge clk) if (!rst && !wdone) begin
    if (have) begin
      if (d == prev + 4'd1) begin
        if (run == PKT / 4 - 1) begin run = 0; ref_ok++; end else run++;
      end else begin run = 0; ref_err++; end
    end
    have = 1; prev = d;
  end
  `WATCHDOG(1000000)
  initial begin
    #1 rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 331 == 100) d = d + 4'd3; else d = d + 4'd1;   // a break now and then
    end
    @(negedge clk);
    @(negedge clk);
    `CHECK(nok == ref_ok, $sformatf("packets %0d vs %0d", nok, ref_ok))
    `CHECK(nerr == ref_err, $sformatf("errors %0d vs %0d", nerr, ref_err))
    `CHECK(ref_ok > 100, "enough packets")
    `CHECK(meas, "measuring before window end")
    wdone = 1;
    repeat (3) @(negedge clk);
    begin
      automatic int frozen = nok;
      repeat (200) begin @(negedge clk); d = d + 4'd1; end
      `CHECK(nok == frozen, "frozen after window")
      `CHECK(!meas, "measuring low after window")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
