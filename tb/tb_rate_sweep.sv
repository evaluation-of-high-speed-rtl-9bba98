// tb_rate_sweep: runs the line rates of the original measurement campaign
// through the top. LVDS: 400, 500, 600, 700, 760, 800 and 840 Mbit/s, each in
// its own run (reset, lock, one window); the 2048-bit packets counted in the
// window must match rate x window / 2048 within one packet. Transceivers: the
// 14 rates from 800 to 1860 Mbit/s, each after a fresh reset of all three
// boards; once the ring is in count mode the packets arriving over 40 us must
// match 8/10 of the line rate (8b/10b) within one packet, with no sequence
// errors. The window is shortened to 5000 reference cycles (100 us); the rates
// come from the original tables, the window length is this test's choice.
`timescale 1ps/1fs
module tb_rate_sweep;
`include "tb_check.svh"
  localparam longint unsigned LIMIT = 5000;
  localparam int NL = 7, NX = 14;
  int lvds_rates [NL] = '{400, 500, 600, 700, 760, 800, 840};
  int xcvr_rates [NX] = '{800, 1000, 1200, 1300, 1400, 1500, 1600, 1700, 1780, 1800,
                          1820, 1840, 1850, 1860};
  realtime lhalf = 1000.0, xhalf = 294.0;
  logic lvds_fast = 0, lvds_ref = 0, mgmt = 0, xref = 0, xser = 0;
  logic lvds_mrst = 0, lvds_srst = 0;
  logic [2:0] xrst = 3'b000;
  always #(lhalf) lvds_fast = ~lvds_fast;
  always #(xhalf) xser = ~xser;
  always #10000 lvds_ref = ~lvds_ref;
  always #5000 mgmt = ~mgmt;
  always #10000 xref = ~xref;
  logic [3:0]  out_rx;
  logic [25:0] number_ok;
  logic [15:0] number_err;
  logic        lvds_meas, lvds_locked;
  logic [7:0]  x_out;
  logic [27:0] detout;
  logic [15:0] x_err, x_lat, x_sync;
  logic        x_lat_v, x_meas;
  logic [2:0]  x_al, x_txr, x_rxr;
  hsio_eval_top #(.TIME_LIMIT(LIMIT)) dut (
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
  bit lvds_done = 0, xcvr_done = 0;
  `WATCHDOG(64'd20_000_000_000)   // 20 ms
  initial begin : lvds_sweep
    for (int i = 0; i < NL; i++) begin
      real expect_p;
      lvds_mrst = 0; lvds_srst = 0;
      #1000 lvds_mrst = 1; lvds_srst = 1;
      lhalf = 1.0e6 / lvds_rates[i] / 2.0;
      #30000 lvds_mrst = 0;
      #7000  lvds_srst = 0;
      wait (lvds_locked);
      repeat (4) @(posedge dut.u_lvds_slave.rx_outclock);
      wait (!lvds_meas);
      expect_p = real'(lvds_rates[i]) * 1.0e6 * real'(LIMIT) * 20.0e-9 / 2048.0;
      $display("LVDS %0d Mbit/s: %0d packets in the window (expected %0.1f), %0d errors",
               lvds_rates[i], number_ok, expect_p, number_err);
      `CHECK(real'(number_ok) >= expect_p - 1.0 && real'(number_ok) <= expect_p + 1.0,
             $sformatf("LVDS packet count at %0d Mbit/s", lvds_rates[i]))
      `CHECK(number_err == 0, "LVDS no sequence errors")
    end
    lvds_done = 1;
  end
  initial begin : xcvr_sweep
    for (int i = 0; i < NX; i++) begin
      int unsigned p0, p1;
      realtime ta, tb;
      real expect_p;
      xrst = 3'b000;
      #1000 xrst = 3'b111;
      xhalf = 1.0e6 / xcvr_rates[i] / 2.0;
      #30000 xrst = 3'b000;
      wait (&x_txr && &x_rxr && &x_al && dut.u_xcvr_master.send_state == hsio_pkg::SEND_COUNT);
      #5000000;
      p0 = detout; ta = $realtime;
      #40000000;
      p1 = detout; tb = $realtime;
      expect_p = real'(xcvr_rates[i]) * 1.0e6 * 0.8 * (tb - ta) * 1.0e-12 / 2048.0;
      $display("XCVR %0d Mbit/s: %0d packets in 40 us (expected %0.1f), latency %0d cycles = %0.0f ns, %0d errors",
               xcvr_rates[i], p1 - p0, expect_p, x_lat, real'(x_lat) * 10.0e3 / xcvr_rates[i], x_err);
      `CHECK(real'(p1 - p0) >= expect_p - 1.0 && real'(p1 - p0) <= expect_p + 1.0,
             $sformatf("XCVR packet rate at %0d Mbit/s", xcvr_rates[i]))
      `CHECK(x_err == 0 && x_meas, "XCVR no errors, window still open")
      `CHECK(x_lat_v, "XCVR latency measured")
    end
    xcvr_done = 1;
  end
  initial begin
    wait (lvds_done && xcvr_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
