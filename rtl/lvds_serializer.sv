// lvds_serializer: LVDS transmitter SERDES (the ALTLVDS_TX function).
// The fast serial clock comes from the PLL. A phase counter divides it by the
// serialization factor; when the counter wraps, the parallel word tx_in is
// loaded into a shift register and sent most significant bit first, one bit per
// fast clock. The same counter makes the core clock tx_coreclock (data rate /
// FACTOR), which clocks the user logic that feeds tx_in, and the forwarded
// clock tx_outclock (data rate / B). With B = FACTOR the forwarded clock rises
// exactly when the MSB of a word appears on tx_out, so the receiver can find the
// word boundary from it. Factor 4 and B = 4 are the evaluated configuration; the
// divide-by-counter clocking and the reset behaviour are this design's choices.
// Interface: fast_clk, rst (synchronous to fast_clk), tx_in[FACTOR-1:0] (stable
// while tx_coreclock is high, i.e. written by logic on its rising edge),
// tx_out, tx_coreclock, tx_outclock.
// Timing: a word is loaded FACTOR-1 fast cycles after the tx_coreclock edge
// that produced it and appears on tx_out from the next fast edge on.
module lvds_serializer #(
  parameter int unsigned FACTOR = 4,    // serialization factor (2..10, not 3)
  parameter int unsigned B      = 4     // out-clock divide factor
) (
  input  logic              fast_clk,
  input  logic              rst,
  input  logic [FACTOR-1:0] tx_in,
  output logic              tx_out,
  output logic              tx_coreclock,
  output logic              tx_outclock
);
  localparam int unsigned CW = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  localparam int unsigned BW = (B > 1) ? $clog2(B) : 1;

  logic [CW-1:0]     phase;
  logic [BW-1:0]     bphase;
  logic [FACTOR-1:0] shreg;

  initial begin
    assert (FACTOR >= 2 && FACTOR <= 10 && FACTOR != 3)
      else $error("lvds_serializer: unsupported serialization factor %0d", FACTOR);
  end

  always_ff @(posedge fast_clk) begin
    if (rst) begin
      phase        <= '0;
      bphase       <= '0;
      shreg        <= '0;
      tx_coreclock <= 1'b0;
      tx_outclock  <= 1'b0;
    end else begin
      // word counter and load
      if (phase == CW'(FACTOR - 1)) begin
        phase <= '0;
        shreg <= tx_in;
      end else begin
        phase <= phase + 1'b1;
        shreg <= {shreg[FACTOR-2:0], 1'b0};
      end
      // forwarded clock, high for the first half of each B-bit period
      if (bphase == BW'(B - 1)) bphase <= '0;
      else                      bphase <= bphase + 1'b1;
      tx_outclock  <= ((bphase == BW'(B - 1)) ? 0 : int'(bphase) + 1) < int'((B + 1) / 2);
      tx_coreclock <= ((phase == CW'(FACTOR - 1)) ? 0 : int'(phase) + 1) < int'((FACTOR + 1) / 2);
    end
  end

  assign tx_out = shreg[FACTOR-1];
endmodule
