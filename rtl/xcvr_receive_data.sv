// xcvr_receive_data: receive-data block of the transceiver boards.
// Watches the status that comes with every received byte. While the link is
// not aligned it holds word_align high, so the manual word aligner searches for
// the comma, and it counts consecutive good K28.5 characters (pattern detect
// and control flag set, no code or disparity error); after SYNC_COMMAS of them
// the link is aligned. An aligned link falls back to unaligned after
// LOSS_ERRS consecutive bytes with a code or disparity error, or when the
// receiver leaves ready. The received byte and control flag are registered to
// out_data / out_k. Thresholds and the loss rule are this design's choices.
// Interface: refclock (the receive fabric clock), rst (asynchronous), rx_ready,
// the received byte with its flags and rx_valid, word_align, aligned
// (out_contr of the evaluated design), out_data, out_k, out_valid.
// Timing: outputs are registered, one cycle after the byte.
module xcvr_receive_data
  import hsio_pkg::*;
#(
  parameter int unsigned SYNC_COMMAS = 4,
  parameter int unsigned LOSS_ERRS   = 2
) (
  input  logic       refclock,
  input  logic       rst,
  input  logic       rx_ready,
  input  logic       rx_valid,
  input  logic [7:0] in_data,
  input  logic       in_k,
  input  logic       patterndetect,
  input  logic       error_in,
  input  logic       disp_in,
  output logic       word_align,
  output logic       aligned,
  output logic [7:0] out_data,
  output logic       out_k,
  output logic       out_valid
);
  localparam int unsigned SW = $clog2(SYNC_COMMAS + 1);
  localparam int unsigned LW = $clog2(LOSS_ERRS + 1);

  logic          ready_s, bad, comma;
  logic [SW-1:0] good_cnt;
  logic [LW-1:0] err_cnt;

  sync_2ff u_sync (.clk(refclock), .d(rx_ready), .q(ready_s));

  assign bad   = rx_valid & (error_in | disp_in);
  assign comma = rx_valid & patterndetect & in_k & (in_data == K28_5) & ~bad;

  always_ff @(posedge refclock or posedge rst) begin
    if (rst) begin
      aligned   <= 1'b0;
      good_cnt  <= '0;
      err_cnt   <= '0;
      out_data  <= '0;
      out_k     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_data  <= in_data;
      out_k     <= in_k;
      out_valid <= rx_valid & ready_s;
      if (!ready_s) begin
        aligned  <= 1'b0;
        good_cnt <= '0;
        err_cnt  <= '0;
      end else if (!aligned) begin
        if (comma) begin
          if (good_cnt == SW'(SYNC_COMMAS - 1)) begin
            aligned  <= 1'b1;
            good_cnt <= '0;
            err_cnt  <= '0;
          end else begin
            good_cnt <= good_cnt + 1'b1;
          end
        end else if (rx_valid) begin
          good_cnt <= '0;
        end
      end else if (rx_valid) begin
        if (bad) begin
          if (err_cnt == LW'(LOSS_ERRS - 1)) aligned <= 1'b0;
          else                               err_cnt <= err_cnt + 1'b1;
        end else begin
          err_cnt <= '0;
        end
      end
    end
  end

  assign word_align = ~aligned;
endmodule
