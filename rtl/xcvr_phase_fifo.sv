// xcvr_phase_fifo: phase compensation FIFO of the transceiver PCS.
// A small dual-clock FIFO between two clocks of the same frequency but unknown
// phase: the PCS parallel clock on one side and the FPGA fabric interface clock
// on the other. Write and read pointers are Gray coded and each is brought into
// the other clock domain through two flip-flops, the usual asynchronous FIFO.
// Reading starts as soon as the FIFO is not empty, which keeps the latency low
// (the "low latency" FIFO mode). A write into a full FIFO is dropped and
// flagged; a read of an empty FIFO returns nothing (rd_valid low).
// Interface: wr_clk, wr_en, wr_data, full, overflow (sticky); rd_clk, rd_en,
// rd_data, rd_valid (registered: rd_data is new this cycle); rst (asynchronous,
// resets both sides). DEPTH must be a power of two.
// Timing: a word written on a wr_clk edge can be read three to four rd_clk
// edges later.
module xcvr_phase_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic         rst,
  input  logic         wr_clk,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         overflow,
  input  logic         rd_clk,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  wgray_r1, wgray_r2, rgray_w1, rgray_w2;
  logic [AW:0]  wbin_nxt, rbin_nxt;
  logic         empty;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("xcvr_phase_fifo: DEPTH must be a power of two");

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full     = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nxt = wbin + 1'b1;

  always_ff @(posedge wr_clk or posedge rst) begin
    if (rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        if (!full) begin
          wbin  <= wbin_nxt;
          wgray <= bin2gray(wbin_nxt);
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read side
  assign empty    = (rgray == wgray_r2);
  assign rbin_nxt = rbin + 1'b1;

  always_ff @(posedge rd_clk or posedge rst) begin
    if (rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rd_valid <= 1'b0;
      if (rd_en && !empty) begin
        rd_data  <= mem[rbin[AW-1:0]];
        rd_valid <= 1'b1;
        rbin     <= rbin_nxt;
        rgray    <= bin2gray(rbin_nxt);
      end
    end
  end
endmodule
