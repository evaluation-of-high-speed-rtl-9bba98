// xcvr_serializer: PMA serializer of a transceiver channel.
// Divides the serial clock by WIDTH to make the transmitter parallel clock
// tx_clkout and shifts each parallel word out least significant bit first (bit
// 0 of a 10-bit code group is code bit 'a'). The word on par_in is loaded on
// the serial edge on which tx_clkout rises; logic clocked by tx_clkout has a
// whole word time to present the next word.
// Interface: serial_clk (from the transmit PLL), rst (asynchronous: the
// analog reset; the line then idles low), par_in[WIDTH-1:0], ser_out, tx_clkout.
// Timing: bit 0 of a word leaves on the serial edge after it was loaded.
module xcvr_serializer #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             serial_clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] par_in,
  output logic             ser_out,
  output logic             tx_clkout
);
  localparam int unsigned CW = $clog2(WIDTH);
  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] shreg;

  always_ff @(posedge serial_clk or posedge rst) begin
    if (rst) begin
      cnt       <= '0;
      shreg     <= '0;
      tx_clkout <= 1'b0;
    end else begin
      if (cnt == CW'(WIDTH - 1)) begin
        cnt   <= '0;
        shreg <= par_in;
      end else begin
        cnt   <= cnt + 1'b1;
        shreg <= {1'b0, shreg[WIDTH-1:1]};
      end
      // high for the first half of each word time
      tx_clkout <= (cnt == CW'(WIDTH - 1)) || (int'(cnt) < int'(WIDTH / 2) - 1);
    end
  end

  assign ser_out = shreg[0];
endmodule
