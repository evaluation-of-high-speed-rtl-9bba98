// tb_xcvr_receive_data: SYNC_COMMAS good K28.5 in a row must set aligned
// (word_align low); a broken run must start counting again; once aligned a
// single bad byte is tolerated, LOSS_ERRS bad bytes in a row drop alignment;
// leaving rx_ready drops it too. Bytes pass through one cycle late.
`timescale 1ns/1ps
module tb_xcvr_receive_data;
`include "tb_check.svh"
  logic clk = 0, rst = 0, rdy = 0, v = 1, k = 0, pd = 0, e = 0, de = 0;
  logic [7:0] d = 0, od;
  logic wa, al, ok, ov;
  always #4 clk = ~clk;
  xcvr_receive_data #(.SYNC_COMMAS(4), .LOSS_ERRS(2)) dut (.refclock(clk), .rst(rst), .rx_ready(rdy),
    .rx_valid(v), .in_data(d), .in_k(k), .patterndetect(pd), .error_in(e), .disp_in(de),
    .word_align(wa), .aligned(al), .out_data(od), .out_k(ok), .out_valid(ov));
  task automatic put(input logic [7:0] dd, input logic kk, input logic ee);
    @(negedge clk); d = dd; k = kk; pd = kk && dd == 8'hBC; e = ee; de = 0;
    @(posedge clk); #1;
    `CHECK(od == dd && ok == kk, "byte passes through")
    `CHECK(wa == !al, "word_align is not aligned")
  endtask
  `WATCHDOG(100000)
  initial begin
    #1 rst = 1; #20 rst = 0;
    rdy = 1; repeat (4) @(posedge clk);
    repeat (10) put(8'h11, 0, 0);
    `CHECK(!al && wa, "not aligned on data")
    repeat (3) put(8'hBC, 1, 0);
    `CHECK(!al, "three commas not enough")
    put(8'h55, 0, 0);
    repeat (3) put(8'hBC, 1, 0);
    `CHECK(!al, "run was broken")
    put(8'hBC, 1, 0);
    `CHECK(al && !wa && ov, "aligned after four commas")
    put(8'h01, 0, 1);
    `CHECK(al, "one error tolerated")
    put(8'h02, 0, 0);
    put(8'h03, 0, 1);
    `CHECK(al, "isolated errors tolerated")
    put(8'h04, 0, 0);
    put(8'h05, 0, 1);
    put(8'h06, 0, 1);
    `CHECK(!al && wa, "two errors in a row drop alignment")
    repeat (4) put(8'hBC, 1, 0);
    `CHECK(al, "realigned")
    @(negedge clk) rdy = 0;
    repeat (4) @(posedge clk); #1;
    `CHECK(!al && !ov, "not ready drops alignment")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
