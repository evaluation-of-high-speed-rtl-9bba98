// xcvr_data_from_rx: repeater of a transceiver slave board.
// Passes every byte its receiver delivers, with its control flag, on to its own
// transmitter, so the data goes on around the ring. While its receiver is not
// aligned (or delivers nothing) it sends K28.5 instead, so the next board can
// stay aligned. The K28.5 fill is this design's choice.
// Interface: refclock (slave receive fabric clock, which also writes the
// transmitter's phase FIFO), rst (asynchronous), aligned, rx_valid,
// rx_data_in, rx_k_in, out_data, out_k.
// Timing: one registered stage.
module xcvr_data_from_rx
  import hsio_pkg::*;
(
  input  logic       refclock,
  input  logic       rst,
  input  logic       aligned,
  input  logic       rx_valid,
  input  logic [7:0] rx_data_in,
  input  logic       rx_k_in,
  output logic [7:0] out_data,
  output logic       out_k
);
  always_ff @(posedge refclock or posedge rst) begin
    if (rst) begin
      out_data <= K28_5;
      out_k    <= 1'b1;
    end else if (aligned && rx_valid) begin
      out_data <= rx_data_in;
      out_k    <= rx_k_in;
    end else begin
      out_data <= K28_5;
      out_k    <= 1'b1;
    end
  end
endmodule
