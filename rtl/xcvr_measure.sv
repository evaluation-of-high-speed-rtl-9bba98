// xcvr_measure: measurement block of the transceiver master board.
// Bandwidth: the ring returns the master's 8-bit count; a byte is good when it
// is a data byte one greater (mod 256) than the byte before. Every
// PACKET_BITS/8 = 256 good bytes count as one packet in detout_s; other bytes
// are counted in err_count and restart the packet. Counting stops when the
// time counter ends the window (window_done, synchronized here).
// Latency: tx_mark starts a cycle counter when the count value 0 enters the
// transmitter; the counter stops when value 0 comes back, and its value is the
// ring latency in fabric clock cycles (latency, with latency_valid). Each new
// value 0 gives a new measurement. The latency in seconds is latency times the
// fabric clock period.
// Interface: clk (master fabric clock, which both sends and receives), rst
// (asynchronous), in_data, in_k, in_valid, tx_mark, window_done, detout_s,
// err_count, latency, latency_valid, measuring.
module xcvr_measure
  import hsio_pkg::*;
#(
  parameter int unsigned PKT_BITS = PACKET_BITS,
  parameter int unsigned NW = 28,
  parameter int unsigned EW = 16,
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [7:0]    in_data,
  input  logic          in_k,
  input  logic          in_valid,
  input  logic          tx_mark,
  input  logic          window_done,
  output logic [NW-1:0] detout_s,
  output logic [EW-1:0] err_count,
  output logic [LW-1:0] latency,
  output logic          latency_valid,
  output logic          measuring
);
  localparam int unsigned PW  = PKT_BITS / 8;
  localparam int unsigned PCW = $clog2(PW + 1);

  logic           done_s, have_prev, timing;
  logic [7:0]     prev;
  logic [PCW-1:0] bytes;
  logic [LW-1:0]  lat_cnt;

  sync_2ff u_sync (.clk(clk), .d(window_done), .q(done_s));
  assign measuring = ~done_s;

  // bandwidth
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      have_prev <= 1'b0;
      prev      <= '0;
      bytes     <= '0;
      detout_s  <= '0;
      err_count <= '0;
    end else if (!done_s && in_valid) begin
      if (in_k) begin
        have_prev <= 1'b0;           // idle / alignment characters
        bytes     <= '0;
      end else begin
        prev      <= in_data;
        have_prev <= 1'b1;
        if (have_prev) begin
          if (in_data == prev + 8'd1) begin
            if (bytes == PCW'(PW - 1)) begin
              bytes    <= '0;
              detout_s <= detout_s + 1'b1;
            end else begin
              bytes <= bytes + 1'b1;
            end
          end else begin
            bytes <= '0;
            if (err_count != '1) err_count <= err_count + 1'b1;
          end
        end
      end
    end
  end

  // latency
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      timing        <= 1'b0;
      lat_cnt       <= '0;
      latency       <= '0;
      latency_valid <= 1'b0;
    end else begin
      if (timing) lat_cnt <= lat_cnt + 1'b1;
      if (timing && in_valid && !in_k && in_data == 8'd0) begin
        timing        <= 1'b0;
        latency       <= lat_cnt;
        latency_valid <= 1'b1;
      end else if (tx_mark && !timing) begin
        timing  <= 1'b1;
        lat_cnt <= 'd1;
      end
    end
  end
endmodule
