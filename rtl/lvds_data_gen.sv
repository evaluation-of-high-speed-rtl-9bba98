// lvds_data_gen: test-data source of the LVDS master board.
// A free-running counter produces the digits 0..15, one per rising edge of the
// transmitter core clock, and drives them onto the SERDES parallel input, as in
// the evaluation set-up. Asynchronous active-high reset clears the counter to 0.
// Interface: refclock (the transmitter core clock), rst, out_data[W-1:0].
// Timing: out_data advances by one every cycle and wraps from 2^W-1 to 0.
module lvds_data_gen #(
  parameter int unsigned W = 4          // serialization factor = word width
) (
  input  logic         refclock,
  input  logic         rst,
  output logic [W-1:0] out_data
);
  always_ff @(posedge refclock or posedge rst) begin
    if (rst) out_data <= '0;
    else     out_data <= out_data + 1'b1;
  end
endmodule
