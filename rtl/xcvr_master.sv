// xcvr_master: transceiver master board of the ring.
// One transceiver channel with its reset controller, the send-data generator,
// the receive-data block, the measurement block and the time counter. The
// fabric logic of this board runs on one clock, the transmitter parallel clock
// tx_std_clkout: it writes the transmitter and also reads the receiver through
// the receive phase FIFO, so sending and receiving are counted in the same
// cycles and the ring latency is exact in cycles of that clock.
// Interface: tx_serial_clk / rx_serial_clk (from the transmit PLL and the CDR,
// not part of this RTL), mgmt_clk (reset controller and calibration clock),
// ref_clk (clock of the time counter), rst (board reset, active high),
// rx_serial_data, tx_serial_data, and the measured values.
module xcvr_master
  import hsio_pkg::*;
#(
  parameter longint unsigned TIME_LIMIT = 64'd1_500_000_000,
  parameter int unsigned LOCK_CYCLES = 200,
  parameter int unsigned LTD_CYCLES  = 400,
  parameter int unsigned CAL_CYCLES  = 100,
  parameter int unsigned K_TIMEOUT   = 256
) (
  input  logic        tx_serial_clk,
  input  logic        rx_serial_clk,
  input  logic        mgmt_clk,
  input  logic        ref_clk,
  input  logic        rst,
  input  logic        rx_serial_data,
  output logic        tx_serial_data,
  output logic [7:0]  out_data,
  output logic [27:0] detout_s,
  output logic [15:0] err_count,
  output logic [15:0] latency,
  output logic        latency_valid,
  output logic        measuring,
  output logic        aligned,
  output logic        tx_ready,
  output logic        rx_ready,
  output logic [15:0] sync_entries
);
  logic pll_powerdown, tx_analogreset, tx_digitalreset, rx_analogreset, rx_digitalreset;
  logic pll_locked, rx_is_lockedtodata, tx_cal_busy, rx_cal_busy;
  logic fab_clk, rx_clkout;
  logic [7:0] tx_data, rx_data;
  logic tx_k, rx_k, rx_err, rx_disp, rx_pd, rx_sync, rx_valid, word_align;
  logic rd_k, rd_valid, meas_valid, tx_mark, win_done, meas_rst;
  logic [7:0] rd_data;
  send_state_t send_state;

  xcvr_reset_ctrl u_rst (
    .clock(mgmt_clk), .reset(rst),
    .pll_locked(pll_locked), .tx_cal_busy(tx_cal_busy), .rx_cal_busy(rx_cal_busy),
    .rx_is_lockedtodata(rx_is_lockedtodata),
    .pll_powerdown(pll_powerdown), .tx_analogreset(tx_analogreset),
    .tx_digitalreset(tx_digitalreset), .rx_analogreset(rx_analogreset),
    .rx_digitalreset(rx_digitalreset), .tx_ready(tx_ready), .rx_ready(rx_ready));

  xcvr_native_phy #(.LOCK_CYCLES(LOCK_CYCLES), .LTD_CYCLES(LTD_CYCLES),
                    .CAL_CYCLES(CAL_CYCLES)) u_phy (
    .tx_serial_clk(tx_serial_clk), .rx_serial_clk(rx_serial_clk),
    .mgmt_clk(mgmt_clk), .mgmt_rst(rst),
    .pll_powerdown(pll_powerdown), .tx_analogreset(tx_analogreset),
    .tx_digitalreset(tx_digitalreset), .rx_analogreset(rx_analogreset),
    .rx_digitalreset(rx_digitalreset),
    .pll_locked(pll_locked), .rx_is_lockedtodata(rx_is_lockedtodata),
    .tx_cal_busy(tx_cal_busy), .rx_cal_busy(rx_cal_busy),
    .tx_std_coreclkin(fab_clk), .tx_std_clkout(fab_clk),
    .tx_parallel_data(tx_data), .tx_datak(tx_k),
    .rx_std_coreclkin(fab_clk), .rx_std_clkout(rx_clkout),
    .rx_std_wa_patternalign(word_align),
    .rx_parallel_data(rx_data), .rx_datak(rx_k), .rx_errdetect(rx_err),
    .rx_disperr(rx_disp), .rx_patterndetect(rx_pd), .rx_syncstatus(rx_sync),
    .rx_valid(rx_valid),
    .tx_serial_data(tx_serial_data), .rx_serial_data(rx_serial_data));

  xcvr_receive_data u_rxd (
    .refclock(fab_clk), .rst(rst), .rx_ready(rx_ready), .rx_valid(rx_valid),
    .in_data(rx_data), .in_k(rx_k), .patterndetect(rx_pd), .error_in(rx_err),
    .disp_in(rx_disp), .word_align(word_align), .aligned(aligned),
    .out_data(rd_data), .out_k(rd_k), .out_valid(rd_valid));

  xcvr_send_data #(.K_TIMEOUT(K_TIMEOUT)) u_txd (
    .refclock(fab_clk), .rst(rst), .tx_ready(tx_ready), .aligned(aligned),
    .rx_k(rd_k), .rx_valid(rd_valid), .out_data(tx_data), .out_k(tx_k),
    .tx_mark(tx_mark), .state(send_state), .sync_entries(sync_entries));

  // the measuring window opens when the ring is first aligned
  assign meas_rst = rst | ~rx_ready;

  time_counter #(.LIMIT(TIME_LIMIT)) u_time (
    .refclock(ref_clk), .rst(meas_rst), .count(), .done(win_done));

  // only bytes received while the link is aligned are measured
  assign meas_valid = rd_valid & aligned;

  xcvr_measure u_meas (
    .clk(fab_clk), .rst(meas_rst), .in_data(rd_data), .in_k(rd_k),
    .in_valid(meas_valid), .tx_mark(tx_mark), .window_done(win_done),
    .detout_s(detout_s), .err_count(err_count), .latency(latency),
    .latency_valid(latency_valid), .measuring(measuring));

  assign out_data = rd_data;
endmodule
