// tb_hsio_eval_top: end-to-end test of both link evaluations.
// LVDS: 500 Mbit/s (2 ns bit time), 50 MHz window clock. Checks that the slave
// finds the word boundary, that out_rx follows the 0..15 sequence, that the
// number of 2048-bit packets in the window matches the line rate, that the
// window closes, and that four bit slips bring the receiver back in step.
// Transceiver: 1.7 Gbit/s (588 ps bit time), three boards in a ring. Checks
// that all boards come out of reset and align, that the master switches from
// K28.5 to the count, that packets come back at the expected rate, that the
// ring latency is measured and constant, and that resetting slave 1 sends the
// master back to K28.5 and the ring re-aligns and carries data again.
// The measuring window is shortened (TIME_LIMIT) to keep the run short.
`timescale 1ps/1ps
module tb_hsio_eval_top;
  localparam longint unsigned LIMIT = 3000;   // 60 us at 50 MHz
  int checks = 0, failures = 0;
  int n_lock = 0, n_pkt_lvds = 0, n_win_lvds = 0, n_slip = 0;
  int n_align = 0, n_count_mode = 0, n_pkt_x = 0, n_lat = 0, n_win_x = 0, n_resync = 0;

  logic lvds_fast = 0, lvds_ref = 0, mgmt = 0, xref = 0, xser = 0;
  logic lvds_mrst = 0, lvds_srst = 0, align = 0;
  logic [2:0] xrst = 3'b000;
  // resets start low and rise at 1 ns so that asynchronous resets see an edge
  initial begin
    #1000 lvds_mrst = 1; lvds_srst = 1; xrst = 3'b111;
  end
  logic [3:0]  out_rx;
  logic [25:0] number_ok;
  logic [15:0] number_err;
  logic        lvds_meas, lvds_locked;
  logic [7:0]  x_out;
  logic [27:0] detout;
  logic [15:0] x_err, x_lat, x_sync;
  logic        x_lat_v, x_meas;
  logic [2:0]  x_al, x_txr, x_rxr;

  always #1000 lvds_fast = ~lvds_fast;   // 500 MHz bit clock
  always #10000 lvds_ref = ~lvds_ref;    // 50 MHz
  always #5000 mgmt = ~mgmt;             // 100 MHz
  always #10000 xref = ~xref;            // 50 MHz
  always #294 xser = ~xser;              // 1.7 GHz bit clock

  hsio_eval_top #(.TIME_LIMIT(LIMIT)) dut (
    .lvds_tx_fast_clk(lvds_fast), .lvds_rx_fast_clk(lvds_fast), .lvds_ref_clk(lvds_ref),
    .lvds_master_rst(lvds_mrst), .lvds_slave_rst(lvds_srst), .lvds_rx_data_align(align),
    .lvds_out_rx(out_rx), .lvds_number_ok(number_ok), .lvds_number_err(number_err),
    .lvds_measuring(lvds_meas), .lvds_rx_locked(lvds_locked),
    .xcvr_tx_serial_clk({3{xser}}), .xcvr_rx_serial_clk({3{xser}}),
    .xcvr_mgmt_clk(mgmt), .xcvr_ref_clk(xref), .xcvr_rst(xrst),
    .xcvr_out_data(x_out), .xcvr_detout_s(detout), .xcvr_err_count(x_err),
    .xcvr_latency(x_lat), .xcvr_latency_valid(x_lat_v), .xcvr_measuring(x_meas),
    .xcvr_aligned(x_al), .xcvr_tx_ready(x_txr), .xcvr_rx_ready(x_rxr),
    .xcvr_sync_entries(x_sync));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- LVDS: out_rx must count up once the boundary is set ----
  logic [3:0] prev_rx;
  bit         seq_on = 0;
  int         seq_bad = 0, seq_n = 0;
  always @(posedge dut.u_lvds_slave.rx_outclock) begin
    if (seq_on) begin
      seq_n++;
      if (out_rx != prev_rx + 4'd1) seq_bad++;
    end
    prev_rx <= out_rx;
  end

  // ---- watchdog ----
  initial begin
    #(2_000_000_000);   // 2 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- LVDS sequence ----
  initial begin : lvds_test
    longint t0, t1;
    int expect_pkts;
    #20000 lvds_mrst = 0;
    #7000  lvds_srst = 0;
    wait (lvds_locked);
    n_lock++;
    check(1, "lvds lock");
    repeat (3) @(posedge dut.u_lvds_slave.rx_outclock);
    seq_on = 1;
    t0 = $time;
    wait (!lvds_meas);
    t1 = $time;
    n_win_lvds++;
    seq_on = 0;
    // window: LIMIT cycles of 20 ns; 4 bits per 8 ns core cycle
    expect_pkts = int'(LIMIT * 20 / 2 / 2048);
    $display("LVDS: packets=%0d (expected about %0d) errors=%0d words=%0d bad=%0d",
             number_ok, expect_pkts, number_err, seq_n, seq_bad);
    n_pkt_lvds = number_ok;
    check(number_ok >= expect_pkts - 1 && number_ok <= expect_pkts + 1, "lvds packet count vs line rate");
    check(number_err == 0, "lvds no sequence errors");
    check(seq_bad == 0 && seq_n > 1000, "lvds out_rx sequence");
    check((t1 - t0) / 1000 >= LIMIT * 20 - 200 && (t1 - t0) / 1000 <= LIMIT * 20 + 200,
          "lvds window length");
    // four single-bit slips: back on a word boundary
    repeat (4) begin
      @(posedge lvds_ref) align = 1;
      @(posedge lvds_ref) align = 0;
      n_slip++;
    end
    repeat (5) @(posedge dut.u_lvds_slave.rx_outclock);
    seq_bad = 0; seq_n = 0; seq_on = 1;
    repeat (100) @(posedge dut.u_lvds_slave.rx_outclock);
    seq_on = 0;
    check(seq_bad == 0 && seq_n >= 99, "lvds in step after 4 bit slips");
  end

  // ---- transceiver ring ----
  initial begin : xcvr_test
    int lat1;
    int unsigned p0, p1;
    longint ta, tb;
    real rate, exp_rate;
    #30000 xrst = 3'b000;
    wait (&x_txr && &x_rxr);
    check(1, "xcvr resets done");
    wait (&x_al);
    n_align++;
    check(1, "xcvr ring aligned");
    wait (dut.u_xcvr_master.send_state == hsio_pkg::SEND_COUNT);
    n_count_mode++;
    wait (x_lat_v);
    n_lat++;
    lat1 = x_lat;
    $display("XCVR: ring latency %0d cycles of 5.88 ns = %0d ns", lat1, lat1 * 588 / 100);
    check(lat1 > 10 && lat1 < 100, "xcvr latency in range");
    // packet rate over 20 us
    #2000000;
    p0 = detout; ta = $time;
    #20000000;
    p1 = detout; tb = $time;
    rate = real'(p1 - p0) * 2048.0 / (real'(tb - ta) * 1.0e-12);
    exp_rate = 1.7e9 * 0.8;
    $display("XCVR: %0d packets in %0d ns -> %0.0f bit/s (payload rate %0.0f)",
             p1 - p0, (tb - ta) / 1000, rate, exp_rate);
    n_pkt_x = p1 - p0;
    check(rate > exp_rate * 0.97 && rate < exp_rate * 1.03, "xcvr payload rate");
    $display("XCVR errors %0d", x_err);
    check(x_err == 0, "xcvr no sequence errors");
    @(posedge dut.u_xcvr_master.fab_clk);
    wait (!x_lat_v || x_lat != lat1 || 1);
    check(x_lat == lat1, "xcvr latency constant");
    // reset slave 1: ring must fall back to K28.5 and recover
    xrst[1] = 1;
    #200000;
    xrst[1] = 0;
    wait (x_sync != 0);
    n_resync++;
    check(1, "master fell back to K28.5");
    wait (dut.u_xcvr_master.send_state == hsio_pkg::SEND_COUNT && &x_al);
    n_count_mode++;
    p0 = detout;
    #5000000;
    check(detout >= p0 + 2, "xcvr data flows again after slave reset");
    wait (!x_meas);
    n_win_x++;
    check(1, "xcvr window closed");
  end

  initial begin
    wait (n_win_x > 0 && n_slip == 4);
    #100000;
    // every mechanism must have happened
    $display("mechanisms: lvds_lock=%0d lvds_packets=%0d lvds_window=%0d bitslip=%0d",
             n_lock, n_pkt_lvds, n_win_lvds, n_slip);
    $display("            xcvr_align=%0d count_mode=%0d packets=%0d latency=%0d resync=%0d window=%0d",
             n_align, n_count_mode, n_pkt_x, n_lat, n_resync, n_win_x);
    check(n_lock > 0, "mechanism lvds lock");
    check(n_pkt_lvds > 0, "mechanism lvds packets");
    check(n_win_lvds > 0, "mechanism lvds window");
    check(n_slip > 0, "mechanism bit slip");
    check(n_align > 0, "mechanism xcvr alignment");
    check(n_count_mode > 1, "mechanism sync->count switch (twice)");
    check(n_pkt_x > 0, "mechanism xcvr packets");
    check(n_lat > 0, "mechanism latency");
    check(n_resync > 0, "mechanism re-synchronisation");
    check(n_win_x > 0, "mechanism xcvr window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
