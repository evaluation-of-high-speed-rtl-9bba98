// xcvr_reset_ctrl: transceiver PHY reset controller.
// Brings a transceiver channel out of reset in the order the hardware needs:
//   TX: hold pll_powerdown for T_PLL_PD cycles; wait for pll_locked and the end
//       of TX calibration; release tx_analogreset; T_TX_DIG cycles later release
//       tx_digitalreset and raise tx_ready.
//   RX: once the PLL is powered up and RX calibration has ended, release
//       rx_analogreset; when rx_is_lockedtodata has been high for T_LTD cycles
//       release rx_digitalreset and raise rx_ready. Losing lock to data puts
//       the receiver back into digital reset.
// Status inputs from other clock domains are synchronized. The sequence is the
// usual one for this PHY; the delay values are this design's choices.
// Interface: clock, reset (asynchronous, active high), the status inputs and
// the five reset outputs, tx_ready, rx_ready.
module xcvr_reset_ctrl
  import hsio_pkg::*;
#(
  parameter int unsigned T_PLL_PD = 100,
  parameter int unsigned T_TX_DIG = 20,
  parameter int unsigned T_LTD    = 40
) (
  input  logic clock,
  input  logic reset,
  input  logic pll_locked,
  input  logic tx_cal_busy,
  input  logic rx_cal_busy,
  input  logic rx_is_lockedtodata,
  output logic pll_powerdown,
  output logic tx_analogreset,
  output logic tx_digitalreset,
  output logic rx_analogreset,
  output logic rx_digitalreset,
  output logic tx_ready,
  output logic rx_ready
);
  localparam int unsigned TMAX = (T_PLL_PD > T_TX_DIG) ?
                                 ((T_PLL_PD > T_LTD) ? T_PLL_PD : T_LTD) :
                                 ((T_TX_DIG > T_LTD) ? T_TX_DIG : T_LTD);
  localparam int unsigned TW = $clog2(TMAX + 1);

  logic locked_s, txcal_s, rxcal_s, ltd_s;
  tx_rst_state_t tx_st;
  rx_rst_state_t rx_st;
  logic [TW-1:0] tx_tmr, rx_tmr;

  sync_2ff u_s0 (.clk(clock), .d(pll_locked),         .q(locked_s));
  sync_2ff u_s1 (.clk(clock), .d(tx_cal_busy),        .q(txcal_s));
  sync_2ff u_s2 (.clk(clock), .d(rx_cal_busy),        .q(rxcal_s));
  sync_2ff u_s3 (.clk(clock), .d(rx_is_lockedtodata), .q(ltd_s));

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      tx_st  <= RST_PLL_PD;
      tx_tmr <= '0;
    end else begin
      case (tx_st)
        RST_PLL_PD: begin
          tx_tmr <= tx_tmr + 1'b1;
          if (tx_tmr == TW'(T_PLL_PD - 1)) begin
            tx_tmr <= '0;
            tx_st  <= RST_WAIT_LOCK;
          end
        end
        RST_WAIT_LOCK:  if (locked_s && !txcal_s) tx_st <= RST_TX_ANALOG;
        RST_TX_ANALOG: begin
          tx_tmr <= tx_tmr + 1'b1;
          if (tx_tmr == TW'(T_TX_DIG - 1)) tx_st <= RST_TX_DIGITAL;
        end
        RST_TX_DIGITAL: tx_st <= RST_DONE;
        default:        if (!locked_s) begin
                          tx_tmr <= '0;
                          tx_st  <= RST_WAIT_LOCK;
                        end
      endcase
    end
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      rx_st  <= RX_ANALOG;
      rx_tmr <= '0;
    end else begin
      case (rx_st)
        RX_ANALOG: if (tx_st != RST_PLL_PD && !rxcal_s) rx_st <= RX_WAIT_LTD;
        RX_WAIT_LTD: begin
          if (!ltd_s) rx_tmr <= '0;
          else begin
            rx_tmr <= rx_tmr + 1'b1;
            if (rx_tmr == TW'(T_LTD - 1)) rx_st <= RX_DIGITAL_DONE;
          end
        end
        default: if (!ltd_s) begin
                   rx_tmr <= '0;
                   rx_st  <= RX_WAIT_LTD;
                 end
      endcase
    end
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      pll_powerdown   <= 1'b1;
      tx_analogreset  <= 1'b1;
      tx_digitalreset <= 1'b1;
      rx_analogreset  <= 1'b1;
      rx_digitalreset <= 1'b1;
      tx_ready        <= 1'b0;
      rx_ready        <= 1'b0;
    end else begin
      pll_powerdown   <= (tx_st == RST_PLL_PD);
      tx_analogreset  <= (tx_st == RST_PLL_PD) || (tx_st == RST_WAIT_LOCK);
      tx_digitalreset <= (tx_st != RST_DONE);
      tx_ready        <= (tx_st == RST_DONE);
      rx_analogreset  <= (rx_st == RX_ANALOG);
      rx_digitalreset <= (rx_st != RX_DIGITAL_DONE);
      rx_ready        <= (rx_st == RX_DIGITAL_DONE);
    end
  end
endmodule
