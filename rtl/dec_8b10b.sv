// dec_8b10b: 8b/10b decoder of the transceiver PCS.
// A 1024-entry table, computed at elaboration as the inverse of the encoding
// function in enc8b10b_pkg, gives for every 10-bit code group the byte, the
// control flag and in which running disparities the code may appear. The
// decoder keeps its own running disparity: a code that is in no table entry
// raises errdetect, a valid code that does not fit the current disparity raises
// disperr. The running disparity follows the disparity of every received code.
// Interface: clk, rst (asynchronous; RD starts negative), en, code[9:0] (bit 0 =
// 'a', first bit received), data[7:0], k, errdetect, disperr.
// Timing: one cycle, outputs are registered.
module dec_8b10b
  import enc8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [9:0] code,
  output logic [7:0] data,
  output logic       k,
  output logic       errdetect,
  output logic       disperr
);
  // entry: {valid in RD+, valid in RD-, k, data}
  typedef logic [10:0] dec_entry_t;

  function automatic dec_entry_t [1023:0] build_table();
    dec_entry_t [1023:0] t;
    logic [10:0] e;
    for (int i = 0; i < 1024; i++) t[i] = '0;
    for (int kk = 0; kk < 2; kk++) begin
      for (int d = 0; d < 256; d++) begin
        if (kk == 0 || k_valid(8'(d))) begin
          for (int r = 0; r < 2; r++) begin
            e = encode(8'(d), kk[0], r[0]);
            t[e[9:0]][7:0] = 8'(d);
            t[e[9:0]][8]   = kk[0];
            if (r == 0) t[e[9:0]][9]  = 1'b1;
            else        t[e[9:0]][10] = 1'b1;
          end
        end
      end
    end
    return t;
  endfunction

  localparam dec_entry_t [1023:0] DEC_TAB = build_table();

  logic       rd;
  dec_entry_t ent;
  int unsigned n1;

  assign ent = DEC_TAB[code];

  always_comb begin
    n1 = 0;
    for (int i = 0; i < 10; i++) n1 += code[i];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rd        <= 1'b0;
      data      <= 8'h00;
      k         <= 1'b0;
      errdetect <= 1'b0;
      disperr   <= 1'b0;
    end else if (en) begin
      data      <= ent[7:0];
      k         <= ent[8];
      errdetect <= ~(ent[9] | ent[10]);
      disperr   <= (ent[9] | ent[10]) & ~(rd ? ent[10] : ent[9]);
      if (n1 > 5)      rd <= 1'b1;
      else if (n1 < 5) rd <= 1'b0;
    end
  end
endmodule
