// lvds_slave: the LVDS slave board of the point-to-point link.
// The receiver SERDES turns the serial channel back into 4-bit words, using the
// forwarded clock for the word boundary. The received word is registered onto
// out_rx (the receive-data block) and checked by the measurement block, which
// counts good 2048-bit packets until the time counter, running on the 50 MHz
// board clock, closes the measuring window. The window opens two receiver
// clocks after the word boundary is set (this design's choice: the word held
// in the receiver register at that moment was still cut on the old boundary).
// Interface: fast_clk (serial-rate clock from the receiver PLL, locked to
// rx_inclock; not part of this RTL), ref_clk (50 MHz), rst (active high),
// rx_in, rx_inclock, rx_data_align (bit slip, low in normal use), out_rx[FACTOR-1:0], number_ok[25:0], number_err[15:0],
// measuring, rx_locked.
module lvds_slave #(
  parameter int unsigned FACTOR = 4,
  parameter longint unsigned TIME_LIMIT = 64'd1_500_000_000
) (
  input  logic              fast_clk,
  input  logic              ref_clk,
  input  logic              rst,
  input  logic              rx_in,
  input  logic              rx_inclock,
  input  logic              rx_data_align,
  output logic [FACTOR-1:0] out_rx,
  output logic [25:0]       number_ok,
  output logic [15:0]       number_err,
  output logic              measuring,
  output logic              rx_locked
);
  logic [FACTOR-1:0] rx_word;
  logic              rx_outclock;
  logic              win_done;
  logic              meas_rst;

  lvds_deserializer #(.FACTOR(FACTOR)) u_rx (
    .fast_clk(fast_clk), .rst(rst), .rx_in(rx_in), .rx_inclock(rx_inclock),
    .rx_data_align(rx_data_align), .rx_out(rx_word), .rx_outclock(rx_outclock),
    .rx_locked(rx_locked));

  // receive-data block: output register on the receiver core clock
  always_ff @(posedge rx_outclock or posedge rst) begin
    if (rst) out_rx <= '0;
    else     out_rx <= rx_word;
  end

  // the window starts two receiver clocks after the word boundary is known, so
  // that the first word measured was captured on the new boundary
  logic [1:0] lock_q;
  always_ff @(posedge rx_outclock or posedge rst) begin
    if (rst) lock_q <= '0;
    else     lock_q <= {lock_q[0], rx_locked};
  end
  assign meas_rst = rst | ~lock_q[1];

  time_counter #(.LIMIT(TIME_LIMIT)) u_time (
    .refclock(ref_clk), .rst(meas_rst), .count(), .done(win_done));

  lvds_measure #(.W(FACTOR), .NW(26), .EW(16)) u_meas (
    .clk(rx_outclock), .rst(meas_rst), .in_data(rx_word), .window_done(win_done),
    .number_ok(number_ok), .number_err(number_err), .measuring(measuring));
endmodule
