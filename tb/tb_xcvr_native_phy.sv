// tb_xcvr_native_phy: one channel in serial loopback (TX line fed straight to
// the RX line, one serial clock). The testbench steps the resets itself and
// checks the lock models (pll_locked LOCK_CYCLES serial clocks after
// powerdown, rx_is_lockedtodata LTD_CYCLES after rx_analogreset, calibration
// busy for CAL_CYCLES). It then sends K28.5 with patternalign high until
// syncstatus, then a byte count: the count must come back in order, without
// error flags, with a constant latency. A single inverted line bit must raise
// errdetect or disperr.
`timescale 1ps/1ps
module tb_xcvr_native_phy;
`include "tb_check.svh"
  localparam int LOCK = 200, LTD = 400, CAL = 100;
  logic sclk = 0, mclk = 0, mrst = 0;
  logic pll_pd = 1, tx_ar = 1, tx_dr = 1, rx_ar = 1, rx_dr = 1;
  logic locked, ltd, tcal, rcal;
  logic txclk, rxclk, pa = 1;
  logic [7:0] td = 8'hBC, rd;
  logic tk = 1, rk, rerr, rdisp, rpd, rsync, rvalid;
  logic line, flip = 0;
  always #400 sclk = ~sclk;          // 1.25 Gbps line, 125 MHz parallel
  always #5000 mclk = ~mclk;         // 100 MHz management clock
  xcvr_native_phy #(.LOCK_CYCLES(LOCK), .LTD_CYCLES(LTD), .CAL_CYCLES(CAL)) dut (
    .tx_serial_clk(sclk), .rx_serial_clk(sclk), .mgmt_clk(mclk), .mgmt_rst(mrst),
    .pll_powerdown(pll_pd), .tx_analogreset(tx_ar), .tx_digitalreset(tx_dr),
    .rx_analogreset(rx_ar), .rx_digitalreset(rx_dr),
    .pll_locked(locked), .rx_is_lockedtodata(ltd), .tx_cal_busy(tcal), .rx_cal_busy(rcal),
    .tx_std_coreclkin(txclk), .tx_std_clkout(txclk), .tx_parallel_data(td), .tx_datak(tk),
    .rx_std_coreclkin(txclk), .rx_std_clkout(rxclk), .rx_std_wa_patternalign(pa),
    .rx_parallel_data(rd), .rx_datak(rk), .rx_errdetect(rerr), .rx_disperr(rdisp),
    .rx_patterndetect(rpd), .rx_syncstatus(rsync), .rx_valid(rvalid),
    .tx_serial_data(line), .rx_serial_data(line ^ flip));

  int tx_cycle = 0, sent_at [256], lat = -1, good = 0, errs = 0;
  bit counting = 0, checking = 0;
  logic [7:0] prev;
  bit have_prev = 0;
  always @(posedge txclk) tx_cycle++;
  always @(posedge txclk) if (rvalid && !rk && checking) begin
    if (have_prev) begin
      `CHECK(rd == prev + 8'd1, $sformatf("count order %h after %h", rd, prev))
      `CHECK(!rerr && !rdisp, "no error flags on clean line")
    end
    if (lat < 0) lat = tx_cycle - sent_at[rd];
    else `CHECK(tx_cycle - sent_at[rd] == lat, "constant latency")
    prev = rd; have_prev = 1; good++;
  end
  always @(posedge txclk) if (rvalid && (rerr || rdisp) && !checking) errs++;
  `WATCHDOG(100000000)
  initial begin
    realtime t0;
    #1000 mrst = 1; pll_pd = 1; tx_ar = 1; tx_dr = 1; rx_ar = 1; rx_dr = 1;
    #20000 mrst = 0;
    t0 = $realtime;
    wait (!tcal);
    `CHECK(($realtime - t0) >= CAL * 10000 - 10000 && ($realtime - t0) <= CAL * 10000 + 10000,
           $sformatf("calibration time %0t", $realtime - t0))
    `CHECK(!rcal, "rx calibration done with tx")
    @(negedge sclk) pll_pd = 0; t0 = $realtime;
    wait (locked);
    `CHECK(($realtime - t0) >= LOCK * 800 - 800 && ($realtime - t0) <= LOCK * 800 + 800,
           $sformatf("pll lock time %0t", $realtime - t0))
    tx_ar = 0; #50000 tx_dr = 0;
    @(negedge sclk) rx_ar = 0; t0 = $realtime;
    wait (ltd);
    `CHECK(($realtime - t0) >= LTD * 800 - 800 && ($realtime - t0) <= LTD * 800 + 800,
           $sformatf("locked-to-data time %0t", $realtime - t0))
    #50000 rx_dr = 0;
    // commas until aligned
    fork
      begin wait (rsync); end
      begin #2000000; end
    join_any
    disable fork;
    `CHECK(rsync, "syncstatus after commas")
    @(posedge txclk); pa = 0;
    repeat (10) @(posedge txclk);
    checking = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge txclk); td = 8'(i); tk = 0; sent_at[8'(i)] = tx_cycle + 1;
    end
    @(negedge txclk); td = 8'hBC; tk = 1;
    repeat (20) @(posedge txclk);
    checking = 0;
    `CHECK(good >= 590, $sformatf("bytes received in order: %0d", good))
    `CHECK(lat > 0 && lat < 20, $sformatf("loop latency %0d cycles", lat))
    // one wrong bit on the line
    @(posedge sclk); #100 flip = 1; @(posedge sclk); #100 flip = 0;
    repeat (20) @(posedge txclk);
    `CHECK(errs >= 1, "single bit error detected")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
