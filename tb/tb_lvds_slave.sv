// tb_lvds_slave: drives the slave with a model of the master's line (0..15,
// MSB first, forwarded clock rising with each MSB) at 500 Mbit/s and checks
// that out_rx counts, that the packet count over the window matches the line
// rate (window bits / 2048) and that a corrupted bit is counted as an error.
`timescale 1ns/1ps
module tb_lvds_slave;
`include "tb_check.svh"
  localparam longint unsigned LIMIT = 1000;   // 20 us
  logic fast = 0, ref_clk = 0, rst = 0, sin = 0, iclk = 0;
  logic [3:0] out_rx;
  logic [25:0] nok;
  logic [15:0] nerr;
  logic meas, locked;
  bit corrupt = 0;
  always #1 fast = ~fast;
  always #10 ref_clk = ~ref_clk;
  lvds_slave #(.TIME_LIMIT(LIMIT)) dut (.fast_clk(fast), .ref_clk(ref_clk), .rst(rst),
    .rx_in(sin), .rx_inclock(iclk), .rx_data_align(1'b0), .out_rx(out_rx),
    .number_ok(nok), .number_err(nerr), .measuring(meas), .rx_locked(locked));
  logic [3:0] w = 0;
  int bp = 0;
  bit go = 0;
  always @(posedge fast) if (go) begin
    #0.2;
    sin  = w[3 - bp] ^ (corrupt && bp == 1);
    iclk = (bp < 2);
    if (bp == 3) begin w = w + 1; corrupt = 0; end
    bp = (bp + 1) % 4;
  end
  logic [3:0] pq;
  int nseq = 0, badseq = 0;
  always @(posedge dut.rx_outclock) begin
    if (locked && nseq++ > 3 && meas && out_rx != pq + 4'd1) badseq++;
    pq <= out_rx;
  end
  `WATCHDOG(1000000)
  initial begin
    longint t0;
    #1 rst = 1;
    repeat (3) @(posedge fast);
    #0.5 rst = 0;
    go = 1;
    wait (locked);
    t0 = $time;
    #5000 corrupt = 1;
    wait (!meas);
    // 20 us at 500 Mbit/s = 10000 bits = 4.88 packets, minus those broken
    $display("LVDS: packets %0d errors %0d after %0d ns", nok, nerr, ($time - t0));
    `CHECK(nok >= 3 && nok <= 5, "packet count vs line rate")
    `CHECK(nerr >= 1 && nerr <= 2, "corrupted word counted")
    `CHECK(badseq >= 1 && badseq <= 2 && nseq > 1000, "out_rx sequence")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
