// sync_2ff: two-flip-flop synchronizer for a single level signal that crosses
// into the clock domain of clk (for example the end-of-window flag of the time
// counter, or an alignment status). Asynchronous inputs only; no reset, the two
// stages settle within two cycles of clk.
// Interface: clk, d (any domain), q (clk domain). Latency: 2 cycles of clk.
module sync_2ff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
