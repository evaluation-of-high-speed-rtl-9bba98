// tb_xcvr_measure: a count stream with occasional wrong bytes and idle
// characters is fed in; a simple reference model counts the 256-byte packets
// (PKT_BITS/8 consecutive increments) and errors, which must match detout_s
// and err_count. The stream is a copy of the tx_mark-ed count delayed by a
// known number of cycles; latency must equal that delay. After window_done the
// counters must stop.
`timescale 1ns/1ps
module tb_xcvr_measure;
`include "tb_check.svh"
  localparam int DELAY = 37;
  logic clk = 0, rst = 0, k = 1, v = 1, mark = 0, wd = 0;
  logic [7:0] d = 8'hBC;
  logic [27:0] det;
  logic [15:0] ec, lat;
  logic lv, meas;
  always #4 clk = ~clk;
  xcvr_measure dut (.clk(clk), .rst(rst), .in_data(d), .in_k(k), .in_valid(v), .tx_mark(mark),
    .window_done(wd), .detout_s(det), .err_count(ec), .latency(lat), .latency_valid(lv),
    .measuring(meas));
  logic [8:0] pipe [$];
  `WATCHDOG(10000000)
  initial begin
    int pk = 0, er = 0, run = 0;
    bit hp = 0;
    logic [7:0] pv = 0, cnt = 0;
    #1 rst = 1; #20 rst = 0;
    repeat (DELAY) pipe.push_back(9'h1BC);
    for (int i = 0; i < 20000; i++) begin
      logic [8:0] x;
      @(negedge clk);
      // source: count with mark on 0, sometimes a corrupted byte or an idle
      mark = (cnt == 0) && i > 0;
      x = {1'b0, cnt};
      if (i == 0) x = 9'h1BC;
      else if (i > 5000 && $urandom % 700 == 0) x = {1'b0, cnt ^ 8'h10};
      else if (i > 5000 && $urandom % 1500 == 0) x = 9'h1BC;
      if (i > 0) cnt++;
      pipe.push_back(x);
      x = pipe.pop_front();
      d = x[7:0]; k = x[8];
      // reference
      if (k) begin hp = 0; run = 0; end
      else begin
        if (hp) begin
          if (d == pv + 8'd1) begin
            if (run == 255) begin run = 0; pk++; end else run++;
          end else begin run = 0; er++; end
        end
        pv = d; hp = 1;
      end
      if (i == 1000) begin
        `CHECK(lv && lat == DELAY, $sformatf("latency %0d want %0d", lat, DELAY))
      end
    end
    @(negedge clk); k = 1; d = 8'hBC;
    @(posedge clk); #1;
    `CHECK(det == 28'(pk), $sformatf("packets %0d want %0d", det, pk))
    `CHECK(ec == 16'(er), $sformatf("errors %0d want %0d", ec, er))
    `CHECK(pk > 60 && er > 3, "stream had packets and errors")
    `CHECK(meas, "measuring before window end")
    wd = 1; repeat (4) @(posedge clk);
    k = 0;
    for (int i = 0; i < 2000; i++) begin @(negedge clk); d = 8'(i); end
    @(posedge clk); #1;
    `CHECK(det == 28'(pk) && !meas, "frozen after window")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
