// lvds_master: the LVDS master board of the point-to-point link.
// The data generator makes the digits 0..15 and feeds them to the transmitter
// SERDES; the SERDES core clock tx_coreclock clocks the generator, so the user
// logic runs at data rate / 4 (125 MHz at 500 Mbit/s). One data channel and the
// forwarded clock leave the board, as in the evaluated one-channel design.
// Interface: fast_clk (serial-rate clock from the transmitter PLL, which is not
// part of this RTL), rst (active high), tx_out (serial data), tx_outclk
// (forwarded clock, data rate / B), tx_coreclock (for observation).
module lvds_master #(
  parameter int unsigned FACTOR = 4,
  parameter int unsigned B      = 4
) (
  input  logic fast_clk,
  input  logic rst,
  output logic tx_out,
  output logic tx_outclk,
  output logic tx_coreclock
);
  logic [FACTOR-1:0] gen_data;

  lvds_data_gen #(.W(FACTOR)) u_gen (
    .refclock(tx_coreclock), .rst(rst), .out_data(gen_data));

  lvds_serializer #(.FACTOR(FACTOR), .B(B)) u_tx (
    .fast_clk(fast_clk), .rst(rst), .tx_in(gen_data),
    .tx_out(tx_out), .tx_coreclock(tx_coreclock), .tx_outclock(tx_outclk));
endmodule
