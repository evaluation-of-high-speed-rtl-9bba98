// tb_xcvr_master: a master board alone, its serial output looped back to its
// input (one serial clock, 1.7 Gbps, so 170 MHz fabric clock). The reset
// sequence must complete, the board must align on its own commas and switch to
// the count; then the number of 256-byte packets counted inside the window
// must match the time spent in count mode at one byte per fabric clock, with
// no sequence errors, and the loop latency must be measured and constant.
// The window is shortened to 3000 reference cycles (60 us).
`timescale 1ps/1ps
module tb_xcvr_master;
`include "tb_check.svh"
  localparam longint unsigned LIMIT = 3000;
  logic ser = 0, mgmt = 0, ref50 = 0, rst = 0, line;
  logic [7:0] od;
  logic [27:0] det;
  logic [15:0] ec, lat, se;
  logic lv, meas, al, txr, rxr;
  always #294 ser = ~ser;
  always #5000 mgmt = ~mgmt;
  always #10000 ref50 = ~ref50;
  xcvr_master #(.TIME_LIMIT(LIMIT)) dut (.tx_serial_clk(ser), .rx_serial_clk(ser),
    .mgmt_clk(mgmt), .ref_clk(ref50), .rst(rst), .rx_serial_data(line), .tx_serial_data(line),
    .out_data(od), .detout_s(det), .err_count(ec), .latency(lat), .latency_valid(lv),
    .measuring(meas), .aligned(al), .tx_ready(txr), .rx_ready(rxr), .sync_entries(se));
  `WATCHDOG(200000000)
  initial begin
    realtime tc, te;
    int l1, fab;
    #1000 rst = 1; #50000 rst = 0;
    wait (txr && rxr);
    `CHECK(1, "reset sequence done")
    wait (al);
    `CHECK(1, "aligned on own commas")
    wait (dut.send_state == hsio_pkg::SEND_COUNT);
    tc = $realtime;
    wait (lv); l1 = lat;
    `CHECK(l1 > 5 && l1 < 40, $sformatf("loop latency %0d cycles", l1))
    wait (!meas); te = $realtime;
    fab = int'((te - tc) / (2 * 294 * 10));
    `CHECK(int'(det) >= fab / 256 - 2 && int'(det) <= fab / 256 + 1,
           $sformatf("packets %0d for %0d count cycles", det, fab))
    `CHECK(det > 10, "packets counted")
    `CHECK(ec == 0, "no sequence errors")
    `CHECK(se == 0, "no return to sync")
    `CHECK(lat == l1, "latency constant")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
