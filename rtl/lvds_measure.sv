// lvds_measure: bandwidth measurement of the LVDS slave board.
// Runs on the receiver core clock and watches the received words. The master
// sends the digits 0..2^W-1 in order, so a word is good when it is one more
// (mod 2^W) than the word before it. Every PACKET_BITS/W good words count as one
// received packet in number_ok; a word that breaks the sequence is counted in
// number_err and restarts the packet. Counting stops when the time counter ends
// the measuring window (window_done, from another clock domain, synchronized
// here). Bandwidth = number_ok * PACKET_BITS / window time.
// Which words count as a packet and the error counter are this design's
// choices; the 2048-bit packet and the 26-bit packet counter follow the
// evaluated design.
// Interface: clk (rx core clock), rst (asynchronous, active high), in_data[W-1:0],
// window_done (asynchronous level), number_ok[NW-1:0], number_err[EW-1:0],
// measuring (window still open).
// Timing: a packet is counted on the clock edge that receives its last good
// word; words received two to three cycles after window_done rises are ignored.
module lvds_measure
  import hsio_pkg::*;
#(
  parameter int unsigned W  = 4,
  parameter int unsigned PKT_BITS = PACKET_BITS,
  parameter int unsigned NW = 26,
  parameter int unsigned EW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [W-1:0]  in_data,
  input  logic          window_done,
  output logic [NW-1:0] number_ok,
  output logic [EW-1:0] number_err,
  output logic          measuring
);
  localparam int unsigned PW = PKT_BITS / W;   // words per packet
  localparam int unsigned PCW = $clog2(PW + 1);

  logic           done_s;
  logic [W-1:0]   prev;
  logic           have_prev;
  logic [PCW-1:0] words;

  sync_2ff u_sync (.clk(clk), .d(window_done), .q(done_s));

  assign measuring = ~done_s;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prev       <= '0;
      have_prev  <= 1'b0;
      words      <= '0;
      number_ok  <= '0;
      number_err <= '0;
    end else if (!done_s) begin
      prev      <= in_data;
      have_prev <= 1'b1;
      if (have_prev) begin
        if (in_data == prev + 1'b1) begin
          if (words == PCW'(PW - 1)) begin
            words     <= '0;
            number_ok <= number_ok + 1'b1;
          end else begin
            words <= words + 1'b1;
          end
        end else begin
          words <= '0;
          if (number_err != '1) number_err <= number_err + 1'b1;
        end
      end
    end
  end
endmodule
