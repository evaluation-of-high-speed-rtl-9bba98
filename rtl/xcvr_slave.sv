// xcvr_slave: transceiver slave board of the ring.
// Receives the stream from the previous board and sends it on to the next one.
// Its fabric logic runs on the recovered receive clock rx_std_clkout: the
// receive-data block aligns the receiver and the data-from-RX repeater writes
// every byte into the transmitter, whose phase FIFO takes it over to the
// transmit parallel clock.
// Interface: tx_serial_clk / rx_serial_clk (transmit PLL and CDR, not part of
// this RTL), mgmt_clk, rst (board reset, active high), rx_serial_data,
// tx_serial_data, out_data (received byte), aligned, tx_ready, rx_ready.
module xcvr_slave #(
  parameter int unsigned LOCK_CYCLES = 200,
  parameter int unsigned LTD_CYCLES  = 400,
  parameter int unsigned CAL_CYCLES  = 100
) (
  input  logic       tx_serial_clk,
  input  logic       rx_serial_clk,
  input  logic       mgmt_clk,
  input  logic       rst,
  input  logic       rx_serial_data,
  output logic       tx_serial_data,
  output logic [7:0] out_data,
  output logic       aligned,
  output logic       tx_ready,
  output logic       rx_ready
);
  logic pll_powerdown, tx_analogreset, tx_digitalreset, rx_analogreset, rx_digitalreset;
  logic pll_locked, rx_is_lockedtodata, tx_cal_busy, rx_cal_busy;
  logic tx_clkout, fab_clk;
  logic [7:0] tx_data, rx_data, rd_data;
  logic tx_k, rx_k, rx_err, rx_disp, rx_pd, rx_sync, rx_valid, word_align;
  logic rd_k, rd_valid;

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
    .tx_std_coreclkin(fab_clk), .tx_std_clkout(tx_clkout),
    .tx_parallel_data(tx_data), .tx_datak(tx_k),
    .rx_std_coreclkin(fab_clk), .rx_std_clkout(fab_clk),
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

  xcvr_data_from_rx u_fwd (
    .refclock(fab_clk), .rst(rst), .aligned(aligned), .rx_valid(rd_valid),
    .rx_data_in(rd_data), .rx_k_in(rd_k), .out_data(tx_data), .out_k(tx_k));

  assign out_data = rd_data;
endmodule
