// tb_xcvr_send_data: with the link ready and aligned the block must send
// K28.5 (BC with datak) for SYNC_HOLD cycles and then the count 0,1,2,..
// without datak, one value per cycle, tx_mark with every value 0 (every 256
// cycles). Without alignment it must keep sending K28.5. In count mode a
// run of received control characters shorter than K_TIMEOUT is ignored, a run
// of K_TIMEOUT sends it back to K28.5, as does loss of alignment; each return
// counts one sync entry.
`timescale 1ns/1ps
module tb_xcvr_send_data;
`include "tb_check.svh"
  import hsio_pkg::*;
  localparam int KT = 256, SH = 64;
  logic clk = 0, rst = 0, rdy = 0, al = 0, rk = 0, rv = 1;
  logic [7:0] od;
  logic ok, mark;
  send_state_t st;
  logic [15:0] se;
  always #4 clk = ~clk;
  xcvr_send_data #(.K_TIMEOUT(KT), .SYNC_HOLD(SH)) dut (.refclock(clk), .rst(rst), .tx_ready(rdy),
    .aligned(al), .rx_k(rk), .rx_valid(rv), .out_data(od), .out_k(ok), .tx_mark(mark),
    .state(st), .sync_entries(se));
  // count the commas before the first count value, check the count stream
  task automatic expect_count_stream(input int n, output int commas);
    logic [7:0] exp_v;
    commas = 0;
    while (ok) begin
      `CHECK(od == 8'hBC, "sync byte is K28.5")
      commas++; @(posedge clk); #1;
    end
    exp_v = 0;
    for (int i = 0; i < n; i++) begin
      `CHECK(!ok && od == exp_v, $sformatf("count %h want %h", od, exp_v))
      `CHECK(mark == (od == 8'd0), "tx_mark with value 0")
      exp_v++; @(posedge clk); #1;
    end
  endtask
  `WATCHDOG(1000000)
  initial begin
    int c, t0;
    #1 rst = 1; #20 rst = 0;
    rdy = 1;
    // not aligned: only commas
    repeat (300) begin @(posedge clk); #1; `CHECK(ok && od == 8'hBC, "commas while unaligned") end
    al = 1;
    expect_count_stream(600, c);
    `CHECK(c >= 1 && c <= 4, $sformatf("already held long enough: %0d commas", c))
    `CHECK(se == 0, "no sync entries yet")
    // short run of control characters is ignored
    rk = 1; repeat (KT - 10) @(posedge clk); #1 rk = 0;
    repeat (20) begin @(posedge clk); #1; `CHECK(!ok, "short K run ignored") end
    // K_TIMEOUT control characters: back to sync
    rk = 1; t0 = 0;
    while (!ok && t0 < 2 * KT) begin @(posedge clk); #1; t0++; end
    rk = 0;
    `CHECK(ok && t0 >= KT && t0 <= KT + 3, $sformatf("back to sync after %0d K", t0))
    `CHECK(se == 1, "one sync entry")
    expect_count_stream(300, c);
    `CHECK(c >= SH && c <= SH + 3, $sformatf("sync hold %0d commas", c))
    // loss of alignment
    @(negedge clk) al = 0;
    repeat (2) @(posedge clk); #1;
    `CHECK(ok && od == 8'hBC && st == SEND_SYNC, "sync on loss of alignment")
    `CHECK(se == 2, "two sync entries")
    repeat (10) @(posedge clk); #1 al = 1;
    expect_count_stream(100, c);
    `CHECK(c >= SH - 12 && c <= SH + 3, $sformatf("sync hold after realign %0d", c))
    // link not ready
    @(negedge clk) rdy = 0;
    repeat (4) @(posedge clk); #1;
    `CHECK(ok && st == SEND_SYNC, "sync when not ready")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
