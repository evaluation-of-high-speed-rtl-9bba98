// xcvr_deserializer: PMA deserializer of a transceiver channel.
// Shifts received bits in on the recovered serial clock, least significant bit
// first, and every WIDTH bits hands a word to the PCS together with the
// recovered parallel clock rx_clkout (serial clock / WIDTH). The word boundary
// here is arbitrary; the word aligner behind it finds the real one.
// Interface: serial_clk (recovered by the CDR), rst (asynchronous: the analog
// reset), ser_in, par_out[WIDTH-1:0] (bit 0 = earliest bit), rx_clkout.
// Timing: par_out changes on the serial edge on which rx_clkout falls, and
// rx_clkout rises half a word later, in the middle of the word.
module xcvr_deserializer #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             serial_clk,
  input  logic             rst,
  input  logic             ser_in,
  output logic [WIDTH-1:0] par_out,
  output logic             rx_clkout
);
  localparam int unsigned CW = $clog2(WIDTH);
  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] shreg;

  always_ff @(posedge serial_clk or posedge rst) begin
    if (rst) begin
      cnt       <= '0;
      shreg     <= '0;
      par_out   <= '0;
      rx_clkout <= 1'b0;
    end else begin
      shreg <= {ser_in, shreg[WIDTH-1:1]};
      if (cnt == CW'(WIDTH - 1)) begin
        cnt     <= '0;
        par_out <= {ser_in, shreg[WIDTH-1:1]};
      end else begin
        cnt <= cnt + 1'b1;
      end
      rx_clkout <= (int'(cnt) >= int'(WIDTH / 2) - 1) && (cnt != CW'(WIDTH - 1));
    end
  end
endmodule
