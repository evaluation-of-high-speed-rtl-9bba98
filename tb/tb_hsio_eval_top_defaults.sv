// tb_hsio_eval_top_defaults: the top with every parameter at its default,
// including the 30 s measuring window (1.5e9 cycles of 50 MHz). The whole
// window cannot be simulated, so this runs the first 2 ms of it: both links
// come up (LVDS lock at 500 Mbit/s; reset sequence, alignment and count mode
// of the three-board ring at 1.7 Gbit/s), packets are counted at the line rate
// without errors, the ring latency is measured, the window counters advance
// by exactly one per 50 MHz cycle, and both windows are still open.
`timescale 1ps/1ps
module tb_hsio_eval_top_defaults;
`include "tb_check.svh"
  logic lvds_fast = 0, lvds_ref = 0, mgmt = 0, xref = 0, xser = 0;
  logic lvds_mrst = 0, lvds_srst = 0;
  logic [2:0] xrst = 3'b000;
  always #1000 lvds_fast = ~lvds_fast;   // 500 Mbit/s
  always #10000 lvds_ref = ~lvds_ref;    // 50 MHz
  always #5000 mgmt = ~mgmt;
  always #10000 xref = ~xref;
  always #294 xser = ~xser;              // 1.7 Gbit/s
  logic [3:0]  out_rx;
  logic [25:0] number_ok;
  logic [15:0] number_err;
  logic        lvds_meas, lvds_locked;
  logic [7:0]  x_out;
  logic [27:0] detout;
  logic [15:0] x_err, x_lat, x_sync;
  logic        x_lat_v, x_meas;
  logic [2:0]  x_al, x_txr, x_rxr;
  hsio_eval_top dut (
    .lvds_tx_fast_clk(lvds_fast), .lvds_rx_fast_clk(lvds_fast), .lvds_ref_clk(lvds_ref),
    .lvds_master_rst(lvds_mrst), .lvds_slave_rst(lvds_srst), .lvds_rx_data_align(1'b0),
    .lvds_out_rx(out_rx), .lvds_number_ok(number_ok), .lvds_number_err(number_err),
    .lvds_measuring(lvds_meas), .lvds_rx_locked(lvds_locked),
    .xcvr_tx_serial_clk({3{xser}}), .xcvr_rx_serial_clk({3{xser}}),
    .xcvr_mgmt_clk(mgmt), .xcvr_ref_clk(xref), .xcvr_rst(xrst),
    .xcvr_out_data(x_out), .xcvr_detout_s(detout), .xcvr_err_count(x_err),
    .xcvr_latency(x_lat), .xcvr_latency_valid(x_lat_v), .xcvr_measuring(x_meas),
    .xcvr_aligned(x_al), .xcvr_tx_ready(x_txr), .xcvr_rx_ready(x_rxr),
    .xcvr_sync_entries(x_sync));
  `WATCHDOG(64'd3_000_000_000)   // 3 ms
  initial begin
    realtime tl, tx0, tx1;
    longint c0, c1;
    int unsigned p0, p1;
    real expect_l, expect_x;
    #1000 lvds_mrst = 1; lvds_srst = 1; xrst = 3'b111;
    #30000 lvds_mrst = 0; xrst = 3'b000;
    #7000 lvds_srst = 0;
    wait (lvds_locked);
    tl = $realtime;
    `CHECK(1, "LVDS locked")
    wait (&x_txr && &x_rxr && &x_al && dut.u_xcvr_master.send_state == hsio_pkg::SEND_COUNT);
    `CHECK(1, "ring up and in count mode")
    wait (x_lat_v);
    `CHECK(x_lat > 10 && x_lat < 100, $sformatf("ring latency %0d cycles", x_lat))
    #10000000;
    p0 = detout; tx0 = $realtime; c0 = dut.u_lvds_slave.u_time.count;
    #1000000000;   // 1 ms
    p1 = detout; tx1 = $realtime; c1 = dut.u_lvds_slave.u_time.count;
    expect_x = 1.7e9 * 0.8 * (tx1 - tx0) * 1.0e-12 / 2048.0;
    `CHECK(real'(p1 - p0) >= expect_x - 1.0 && real'(p1 - p0) <= expect_x + 1.0,
           $sformatf("ring packets %0d in 1 ms, expected %0.1f", p1 - p0, expect_x))
    `CHECK(c1 - c0 >= 49999 && c1 - c0 <= 50001, $sformatf("window counter advanced %0d in 1 ms", c1 - c0))
    expect_l = 500.0e6 * ($realtime - tl) * 1.0e-12 / 2048.0;
    `CHECK(real'(number_ok) >= expect_l - 2.0 && real'(number_ok) <= expect_l + 1.0,
           $sformatf("LVDS packets %0d, expected %0.1f", number_ok, expect_l))
    `CHECK(number_err == 0 && x_err == 0, "no sequence errors")
    `CHECK(lvds_meas && x_meas, "30 s windows still open")
    `CHECK(x_sync == 0, "no resynchronisation")
    $display("defaults: LVDS %0d packets, ring %0d packets/ms, latency %0d cycles", number_ok, p1 - p0, x_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
