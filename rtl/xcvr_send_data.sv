// xcvr_send_data: data generator of the transceiver master board.
// In SEND_SYNC it sends the control character K28.5 (byte BC with datak) so
// that every receiver around the ring can align its words. It stays there for
// at least SYNC_HOLD cycles and until the master's own receiver reports
// alignment, then switches to SEND_COUNT and sends an 8-bit count, one value
// per cycle. (The slaves fill in K28.5 while they are not aligned, so the
// master's receiver can be aligned before the whole ring is; the hold time
// gives every slave enough commas to align.) It goes back to SEND_SYNC when the master's
// receiver loses alignment, or when it keeps receiving control characters
// instead of the count for K_TIMEOUT cycles (a slave further along the ring
// has lost alignment and is filling in K28.5). tx_mark pulses with every count
// value 0 so that the measurement block can time the trip around the ring.
// The hold and timeout rules and their lengths are this design's choices.
// Interface: refclock (transmit fabric clock), rst (asynchronous), tx_ready,
// aligned, rx_k, rx_valid, out_data, out_k, tx_mark, state, sync_entries
// (how often SEND_SYNC was entered after the first time).
// Timing: out_data/out_k are registered.
module xcvr_send_data
  import hsio_pkg::*;
#(
  parameter int unsigned K_TIMEOUT = 256,
  parameter int unsigned SYNC_HOLD = 64
) (
  input  logic        refclock,
  input  logic        rst,
  input  logic        tx_ready,
  input  logic        aligned,
  input  logic        rx_k,
  input  logic        rx_valid,
  output logic [7:0]  out_data,
  output logic        out_k,
  output logic        tx_mark,
  output send_state_t state,
  output logic [15:0] sync_entries
);
  localparam int unsigned TW = $clog2(((K_TIMEOUT > SYNC_HOLD) ? K_TIMEOUT : SYNC_HOLD) + 1);

  logic          ready_s;
  logic [7:0]    count;
  logic [TW-1:0] k_run;

  sync_2ff u_sync (.clk(refclock), .d(tx_ready), .q(ready_s));

  always_ff @(posedge refclock or posedge rst) begin
    if (rst) begin
      state        <= SEND_SYNC;
      count        <= '0;
      k_run        <= '0;
      out_data     <= K28_5;
      out_k        <= 1'b1;
      tx_mark      <= 1'b0;
      sync_entries <= '0;
    end else begin
      tx_mark <= 1'b0;
      case (state)
        SEND_SYNC: begin
          out_data <= K28_5;
          out_k    <= 1'b1;
          count    <= '0;
          if (k_run != TW'(SYNC_HOLD)) k_run <= k_run + 1'b1;   // hold timer
          if (ready_s && aligned && k_run == TW'(SYNC_HOLD)) begin
            state <= SEND_COUNT;
            k_run <= '0;
          end
        end
        default: begin
          out_data <= count;
          out_k    <= 1'b0;
          tx_mark  <= (count == 8'd0);
          count    <= count + 1'b1;
          if (rx_valid) k_run <= rx_k ? k_run + 1'b1 : '0;
          if (!aligned || !ready_s || (k_run == TW'(K_TIMEOUT))) begin
            state        <= SEND_SYNC;
            k_run        <= '0;
            sync_entries <= sync_entries + 1'b1;
          end
        end
      endcase
    end
  end
endmodule
