// xcvr_word_aligner: word aligner of the transceiver receive PCS, manual mode.
// The deserializer delivers 10-bit words with an arbitrary boundary. The aligner
// keeps the last two words (20 bits) and, while the fabric holds
// rx_std_wa_patternalign high, looks at all ten bit offsets for the 10-bit
// alignment pattern 17C (K28.5, negative disparity) or its complement 283
// (positive disparity). When it finds one, it takes that offset as the word
// boundary and sets syncstatus. While patternalign is low the boundary is held.
// Every output word equal to one of the two patterns raises patterndetect.
// Manual mode, pattern length 10 and pattern 17C follow the evaluated
// configuration; searching only while the request is high, and the priority of
// the lowest offset when several match, are this design's choices.
// Interface: clk (recovered parallel clock), rst (asynchronous), din[9:0],
// patternalign, dout[9:0] (bit 0 = first bit), patterndetect, syncstatus.
// Timing: two cycles from din to dout.
module xcvr_word_aligner
  import hsio_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] din,
  input  logic       patternalign,
  output logic [9:0] dout,
  output logic       patterndetect,
  output logic       syncstatus
);
  logic [9:0]  prev;
  logic [19:0] win;
  logic [3:0]  offset, found_off;
  logic        found;
  logic [9:0]  cand;

  assign win = {din, prev};        // win[0] is the earliest bit

  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int o = 9; o >= 0; o--) begin
      if (win[o +: 10] == COMMA_RDN || win[o +: 10] == COMMA_RDP) begin
        found     = 1'b1;
        found_off = 4'(o);
      end
    end
  end

  always_comb begin
    cand = win[{1'b0, offset} +: 10];
    if (patternalign && found) cand = win[{1'b0, found_off} +: 10];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev          <= '0;
      offset        <= '0;
      dout          <= '0;
      patterndetect <= 1'b0;
      syncstatus    <= 1'b0;
    end else begin
      prev <= din;
      if (patternalign && found) begin
        offset     <= found_off;
        syncstatus <= 1'b1;
      end
      dout          <= cand;
      patterndetect <= (cand == COMMA_RDN) || (cand == COMMA_RDP);
    end
  end
endmodule
