// xcvr_native_phy: one transceiver channel in basic mode, the datapath of the
// Native PHY as the evaluated design configures it: 8-bit fabric interface,
// 10-bit PCS-PMA interface (single width, no byte serializer), 8b/10b on,
// manual word aligner with the pattern 17C, low-latency phase FIFOs.
//   TX: fabric word -> TX phase compensation FIFO (tx_std_coreclkin to the
//       parallel clock tx_std_clkout) -> 8b/10b encoder -> serializer.
//   RX: deserializer (recovered clock) -> word aligner -> 8b/10b decoder ->
//       RX phase compensation FIFO (rx_std_clkout to rx_std_coreclkin).
// The analog parts are not logic and stay outside: the transmit PLL and the
// CDR deliver tx_serial_clk and rx_serial_clk as ports. Their lock indications
// and the offset calibration are modelled by counters so that a reset
// controller can be exercised: pll_locked rises LOCK_CYCLES serial clocks after
// pll_powerdown is released, rx_is_lockedtodata LTD_CYCLES after
// rx_analogreset is released, and the calibration busy flags stay high for
// CAL_CYCLES of mgmt_clk after mgmt_rst. These times, the K28.5 idle sent while
// the TX FIFO is empty, and the port subset are this design's choices.
// Interface: see the port list; all resets are active high and asynchronous.
// Timing: fabric to line about 6 parallel clocks, line to fabric about 8.
module xcvr_native_phy
  import hsio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned LOCK_CYCLES = 200,
  parameter int unsigned LTD_CYCLES  = 400,
  parameter int unsigned CAL_CYCLES  = 100
) (
  // clocks from the analog PLL / CDR and the management clock
  input  logic       tx_serial_clk,
  input  logic       rx_serial_clk,
  input  logic       mgmt_clk,
  input  logic       mgmt_rst,
  // resets from the reset controller
  input  logic       pll_powerdown,
  input  logic       tx_analogreset,
  input  logic       tx_digitalreset,
  input  logic       rx_analogreset,
  input  logic       rx_digitalreset,
  // status to the reset controller
  output logic       pll_locked,
  output logic       rx_is_lockedtodata,
  output logic       tx_cal_busy,
  output logic       rx_cal_busy,
  // transmit fabric interface
  input  logic       tx_std_coreclkin,
  output logic       tx_std_clkout,
  input  logic [7:0] tx_parallel_data,
  input  logic       tx_datak,
  // receive fabric interface
  input  logic       rx_std_coreclkin,
  output logic       rx_std_clkout,
  input  logic       rx_std_wa_patternalign,
  output logic [7:0] rx_parallel_data,
  output logic       rx_datak,
  output logic       rx_errdetect,
  output logic       rx_disperr,
  output logic       rx_patterndetect,
  output logic       rx_syncstatus,
  output logic       rx_valid,
  // line
  output logic       tx_serial_data,
  input  logic       rx_serial_data
);
  // ---------------- lock and calibration models ----------------
  logic [$clog2(LOCK_CYCLES + 1)-1:0] lock_cnt;
  logic [$clog2(LTD_CYCLES + 1)-1:0]  ltd_cnt;
  logic [$clog2(CAL_CYCLES + 1)-1:0]  cal_cnt;

  always_ff @(posedge tx_serial_clk or posedge pll_powerdown) begin
    if (pll_powerdown) begin
      lock_cnt   <= '0;
      pll_locked <= 1'b0;
    end else if (!pll_locked) begin
      lock_cnt <= lock_cnt + 1'b1;
      if (lock_cnt == $bits(lock_cnt)'(LOCK_CYCLES - 1)) pll_locked <= 1'b1;
    end
  end

  always_ff @(posedge rx_serial_clk or posedge rx_analogreset) begin
    if (rx_analogreset) begin
      ltd_cnt            <= '0;
      rx_is_lockedtodata <= 1'b0;
    end else if (!rx_is_lockedtodata) begin
      ltd_cnt <= ltd_cnt + 1'b1;
      if (ltd_cnt == $bits(ltd_cnt)'(LTD_CYCLES - 1)) rx_is_lockedtodata <= 1'b1;
    end
  end

  always_ff @(posedge mgmt_clk or posedge mgmt_rst) begin
    if (mgmt_rst) begin
      cal_cnt     <= '0;
      tx_cal_busy <= 1'b1;
    end else if (tx_cal_busy) begin
      cal_cnt <= cal_cnt + 1'b1;
      if (cal_cnt == $bits(cal_cnt)'(CAL_CYCLES - 1)) tx_cal_busy <= 1'b0;
    end
  end
  assign rx_cal_busy = tx_cal_busy;

  // ---------------- transmitter ----------------
  logic [8:0] txf_data;
  logic       txf_valid, txf_full, txf_ovf;
  logic [9:0] tx_code;
  logic       tx_rd, tx_kerr;

  xcvr_phase_fifo #(.W(9), .DEPTH(FIFO_DEPTH)) u_txfifo (
    .rst(tx_digitalreset),
    .wr_clk(tx_std_coreclkin), .wr_en(1'b1), .wr_data({tx_datak, tx_parallel_data}),
    .full(txf_full), .overflow(txf_ovf),
    .rd_clk(tx_std_clkout), .rd_en(1'b1), .rd_data(txf_data), .rd_valid(txf_valid));

  enc_8b10b u_enc (
    .clk(tx_std_clkout), .rst(tx_digitalreset), .en(1'b1),
    .data(txf_valid ? txf_data[7:0] : K28_5), .k(txf_valid ? txf_data[8] : 1'b1),
    .code(tx_code), .rd(tx_rd), .k_err(tx_kerr));

  xcvr_serializer #(.WIDTH(10)) u_ser (
    .serial_clk(tx_serial_clk), .rst(tx_analogreset), .par_in(tx_code),
    .ser_out(tx_serial_data), .tx_clkout(tx_std_clkout));

  // ---------------- receiver ----------------
  logic [9:0] rx_word, al_word;
  logic       al_pd, al_sync, pd_q, sync_q;
  logic [7:0] dec_data;
  logic       dec_k, dec_err, dec_disp;
  rx_byte_t   rxf_in, rxf_out;
  logic       rxf_sync_out, rxf_full, rxf_ovf, rxf_valid;

  xcvr_deserializer #(.WIDTH(10)) u_des (
    .serial_clk(rx_serial_clk), .rst(rx_analogreset), .ser_in(rx_serial_data),
    .par_out(rx_word), .rx_clkout(rx_std_clkout));

  xcvr_word_aligner u_wa (
    .clk(rx_std_clkout), .rst(rx_digitalreset), .din(rx_word),
    .patternalign(rx_std_wa_patternalign), .dout(al_word),
    .patterndetect(al_pd), .syncstatus(al_sync));

  dec_8b10b u_dec (
    .clk(rx_std_clkout), .rst(rx_digitalreset), .en(1'b1), .code(al_word),
    .data(dec_data), .k(dec_k), .errdetect(dec_err), .disperr(dec_disp));

  // keep the aligner flags in step with the decoded byte
  always_ff @(posedge rx_std_clkout or posedge rx_digitalreset) begin
    if (rx_digitalreset) begin
      pd_q   <= 1'b0;
      sync_q <= 1'b0;
    end else begin
      pd_q   <= al_pd;
      sync_q <= al_sync;
    end
  end

  assign rxf_in = '{data: dec_data, k: dec_k, errdetect: dec_err,
                    disperr: dec_disp, pattdet: pd_q};

  xcvr_phase_fifo #(.W($bits(rx_byte_t) + 1), .DEPTH(FIFO_DEPTH)) u_rxfifo (
    .rst(rx_digitalreset),
    .wr_clk(rx_std_clkout), .wr_en(1'b1), .wr_data({sync_q, rxf_in}),
    .full(rxf_full), .overflow(rxf_ovf),
    .rd_clk(rx_std_coreclkin), .rd_en(1'b1), .rd_data({rxf_sync_out, rxf_out}),
    .rd_valid(rxf_valid));

  assign rx_parallel_data = rxf_out.data;
  assign rx_datak         = rxf_out.k;
  assign rx_errdetect     = rxf_out.errdetect;
  assign rx_disperr       = rxf_out.disperr;
  assign rx_patterndetect = rxf_out.pattdet;
  assign rx_syncstatus    = rxf_sync_out;
  assign rx_valid         = rxf_valid;
endmodule
