// tb_xcvr_reset_ctrl: the testbench plays the transceiver: calibration busy
// for 30 clocks after reset, PLL lock 50 clocks after pll_powerdown falls,
// lock-to-data 60 clocks after rx_analogreset falls. It checks the order of
// the sequence and its times in clock cycles: powerdown for T_PLL_PD, TX
// analog reset held until lock and calibration end, TX digital reset T_TX_DIG
// later, RX digital reset T_LTD after lock-to-data, and that loss of
// lock-to-data or of PLL lock puts the digital resets back.
`timescale 1ns/1ps
module tb_xcvr_reset_ctrl;
`include "tb_check.svh"
  localparam int TPD = 100, TDIG = 20, TLTD = 40;
  logic clk = 0, rst = 0;
  logic locked = 0, cal = 1, ltd = 0;
  logic pd, tar, tdr, rar, rdr, trdy, rrdy;
  logic drop_ltd = 0, drop_lock = 0;
  always #5 clk = ~clk;
  xcvr_reset_ctrl #(.T_PLL_PD(TPD), .T_TX_DIG(TDIG), .T_LTD(TLTD)) dut (
    .clock(clk), .reset(rst), .pll_locked(locked), .tx_cal_busy(cal), .rx_cal_busy(cal),
    .rx_is_lockedtodata(ltd), .pll_powerdown(pd), .tx_analogreset(tar), .tx_digitalreset(tdr),
    .rx_analogreset(rar), .rx_digitalreset(rdr), .tx_ready(trdy), .rx_ready(rrdy));
  int cyc = 0, pd_cnt = 0, lock_cnt = 0, ltd_cnt = 0;
  int t_pd_fall = -1, t_tar_fall = -1, t_tdr_fall = -1, t_ltd_rise = -1, t_rdr_fall = -1;
  logic pd_q = 1, tar_q = 1, tdr_q = 1, rdr_q = 1, ltd_q = 0;
  // transceiver model
  always @(posedge clk) begin
    cyc++;
    if (cyc > 30) cal <= 0;
    if (pd) lock_cnt <= 0; else if (lock_cnt < 50) lock_cnt <= lock_cnt + 1;
    locked <= !pd && lock_cnt >= 49 && !drop_lock;
    if (rar) ltd_cnt <= 0; else if (ltd_cnt < 60) ltd_cnt <= ltd_cnt + 1;
    ltd <= !rar && ltd_cnt >= 59 && !drop_ltd;
  end
  // monitors
  always @(posedge clk) if (!rst) begin
    if (pd) pd_cnt++;
    if (pd_q && !pd) t_pd_fall = cyc;
    if (tar_q && !tar) t_tar_fall = cyc;
    if (tdr_q && !tdr) t_tdr_fall = cyc;
    if (!ltd_q && ltd) t_ltd_rise = cyc;
    if (rdr_q && !rdr) t_rdr_fall = cyc;
    if (!tar) `CHECK(!pd, "TX analog reset only released after powerdown")
    if (!tdr) `CHECK(!tar, "TX digital reset only released after analog")
    if (!rdr) `CHECK(!rar, "RX digital reset only released after analog")
    `CHECK(trdy == !tdr, "tx_ready follows TX digital reset")
    `CHECK(rrdy == !rdr, "rx_ready follows RX digital reset")
    pd_q = pd; tar_q = tar; tdr_q = tdr; rdr_q = rdr; ltd_q = ltd;
  end
  `WATCHDOG(100000)
  initial begin
    #1 rst = 1; #20 rst = 0;
    wait (trdy && rrdy);
    repeat (2) @(posedge clk);
    `CHECK(pd_cnt >= TPD && pd_cnt <= TPD + 2, $sformatf("powerdown %0d cycles", pd_cnt))
    `CHECK(t_tar_fall > t_pd_fall + 50, "TX analog reset after PLL lock")
    `CHECK(t_tar_fall > 31, "TX analog reset after calibration")
    `CHECK(t_tdr_fall - t_tar_fall >= TDIG && t_tdr_fall - t_tar_fall <= TDIG + 2,
           $sformatf("TX digital delay %0d", t_tdr_fall - t_tar_fall))
    `CHECK(t_rdr_fall - t_ltd_rise >= TLTD && t_rdr_fall - t_ltd_rise <= TLTD + 4,
           $sformatf("RX digital delay %0d", t_rdr_fall - t_ltd_rise))
    // loss of lock to data
    @(negedge clk) drop_ltd = 1;
    repeat (6) @(posedge clk);
    `CHECK(rdr && !rrdy, "RX digital reset back on loss of lock to data")
    `CHECK(!tdr, "TX side unaffected")
    @(negedge clk) drop_ltd = 0;
    wait (rrdy); @(posedge clk); #1;
    `CHECK(t_rdr_fall - t_ltd_rise >= TLTD && t_rdr_fall - t_ltd_rise <= TLTD + 4, "RX recovers after T_LTD")
    // loss of PLL lock
    @(negedge clk) drop_lock = 1;
    repeat (6) @(posedge clk);
    `CHECK(tdr && !trdy, "TX digital reset back on loss of PLL lock")
    @(negedge clk) drop_lock = 0;
    wait (trdy);
    `CHECK(trdy, "TX recovers")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
