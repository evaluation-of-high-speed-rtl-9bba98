// lvds_deserializer: LVDS receiver SERDES (the ALTLVDS_RX function, without
// clock-data recovery, which the device family does not have).
// Serial bits are shifted in on the rising edge of the fast serial clock, which
// the receiver PLL makes from the forwarded clock rx_inclock. The word boundary
// is deterministic: the first rising edge of rx_inclock seen after reset marks
// the MSB of a word, and from then on every FACTOR bits form one word. This is
// the "PLL locks to the rising edge of the reference clock" behaviour of the
// evaluated receiver; rx_inclock is only used for this once. The bit-slip port
// rx_data_align inserts one bit of latency per rising edge (the word boundary
// moves one bit later); after FACTOR slips the boundary is back where it
// started. The evaluated design leaves rx_data_align low.
// Interface: fast_clk, rst (synchronous), rx_in, rx_inclock, rx_data_align,
// rx_out[FACTOR-1:0] (MSB = first bit received), rx_outclock (rising in the
// middle of each word), rx_locked (word boundary set).
// Timing: rx_out changes on the fast edge that samples the LSB of a word; the
// FACTOR-bit word arrives FACTOR fast cycles after its MSB was sampled.
module lvds_deserializer #(
  parameter int unsigned FACTOR = 4     // deserialization factor (2..10, not 3)
) (
  input  logic              fast_clk,
  input  logic              rst,
  input  logic              rx_in,
  input  logic              rx_inclock,
  input  logic              rx_data_align,
  output logic [FACTOR-1:0] rx_out,
  output logic              rx_outclock,
  output logic              rx_locked
);
  localparam int unsigned CW = $clog2(FACTOR);

  logic [CW-1:0]     phase, phase_nxt;
  logic [FACTOR-1:0] shreg;
  logic              inclk_q, align_q;
  logic              inclk_rise, slip;

  initial begin
    assert (FACTOR >= 2 && FACTOR <= 10 && FACTOR != 3)
      else $error("lvds_deserializer: unsupported deserialization factor %0d", FACTOR);
  end

  assign inclk_rise = rx_inclock & ~inclk_q;
  assign slip       = rx_data_align & ~align_q & rx_locked;

  always_comb begin
    if (!rx_locked && inclk_rise)     phase_nxt = CW'(1);  // this bit is the MSB
    else if (slip)                    phase_nxt = phase;   // hold: one bit later
    else if (phase == CW'(FACTOR-1))  phase_nxt = '0;
    else                              phase_nxt = phase + 1'b1;
  end

  always_ff @(posedge fast_clk) begin
    if (rst) begin
      phase       <= '0;
      shreg       <= '0;
      inclk_q     <= 1'b1;   // a clock already high at release is not an edge
      align_q     <= 1'b0;
      rx_out      <= '0;
      rx_outclock <= 1'b0;
      rx_locked   <= 1'b0;
    end else begin
      inclk_q <= rx_inclock;
      align_q <= rx_data_align;
      shreg   <= {shreg[FACTOR-2:0], rx_in};
      phase   <= phase_nxt;
      if (!rx_locked && inclk_rise) rx_locked <= 1'b1;
      if (rx_locked && !slip && phase == CW'(FACTOR-1))
        rx_out <= {shreg[FACTOR-2:0], rx_in};
      rx_outclock <= (int'(phase_nxt) >= int'(FACTOR / 2));
    end
  end
endmodule
