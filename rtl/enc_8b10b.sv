// enc_8b10b: 8b/10b encoder of the transceiver PCS.
// Each enabled cycle one byte (data[7:0] with the control flag k) is mapped to
// a 10-bit code group and the running disparity is updated, which keeps the
// line DC balanced and the run length at most five. The code itself is the
// standard one and lives in enc8b10b_pkg; bit 0 of code is sent first.
// Interface: clk, rst (asynchronous; running disparity starts negative), en,
// data, k, code[9:0], rd (running disparity after the last code, 1 = RD+),
// k_err (k was set for a byte that is not a defined control character; it is
// then encoded as a data byte).
// Timing: one cycle, code is registered.
module enc_8b10b
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] data,
  input  logic       k,
  output logic [9:0] code,
  output logic       rd,
  output logic       k_err
);
  logic        k_ok;
  logic [10:0] enc;

  assign k_ok = k & k_valid(data);
  assign enc  = encode(data, k_ok, rd);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      code  <= 10'h000;
      rd    <= 1'b0;
      k_err <= 1'b0;
    end else if (en) begin
      code  <= enc[9:0];
      rd    <= enc[10];
      k_err <= k & ~k_ok;
    end
  end
endmodule
