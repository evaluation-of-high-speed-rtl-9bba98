// tb_xcvr_slave: a two-board ring, master -> slave -> master. The slave must
// complete its reset sequence, align on the master's commas, fill in K28.5
// while unaligned and afterwards repeat the master's count byte for byte (its
// out_data must step by one every cycle). The master must then count packets
// without errors through the slave, and the ring latency must be longer than
// the latency of the master alone on a loopback (measured here by a second
// master instance).
`timescale 1ps/1ps
module tb_xcvr_slave;
`include "tb_check.svh"
  localparam longint unsigned LIMIT = 3000;
  logic ser = 0, mgmt = 0, ref50 = 0, rst = 0, m_line, s_line, lb_line;
  logic [7:0] m_od, s_od, lb_od;
  logic [27:0] det, lb_det;
  logic [15:0] ec, lat, se, lb_ec, lb_lat, lb_se;
  logic lv, meas, m_al, m_txr, m_rxr, lb_lv, lb_meas, lb_al, lb_txr, lb_rxr;
  logic s_al, s_txr, s_rxr;
  always #294 ser = ~ser;
  always #5000 mgmt = ~mgmt;
  always #10000 ref50 = ~ref50;
  xcvr_master #(.TIME_LIMIT(LIMIT)) u_m (.tx_serial_clk(ser), .rx_serial_clk(ser),
    .mgmt_clk(mgmt), .ref_clk(ref50), .rst(rst), .rx_serial_data(s_line), .tx_serial_data(m_line),
    .out_data(m_od), .detout_s(det), .err_count(ec), .latency(lat), .latency_valid(lv),
    .measuring(meas), .aligned(m_al), .tx_ready(m_txr), .rx_ready(m_rxr), .sync_entries(se));
  xcvr_slave dut (.tx_serial_clk(ser), .rx_serial_clk(ser), .mgmt_clk(mgmt), .rst(rst),
    .rx_serial_data(m_line), .tx_serial_data(s_line), .out_data(s_od), .aligned(s_al),
    .tx_ready(s_txr), .rx_ready(s_rxr));
  xcvr_master #(.TIME_LIMIT(LIMIT)) u_lb (.tx_serial_clk(ser), .rx_serial_clk(ser),
    .mgmt_clk(mgmt), .ref_clk(ref50), .rst(rst), .rx_serial_data(lb_line), .tx_serial_data(lb_line),
    .out_data(lb_od), .detout_s(lb_det), .err_count(lb_ec), .latency(lb_lat), .latency_valid(lb_lv),
    .measuring(lb_meas), .aligned(lb_al), .tx_ready(lb_txr), .rx_ready(lb_rxr), .sync_entries(lb_se));
  int steps = 0, fills = 0;
  logic [7:0] prev;
  always @(posedge dut.fab_clk) begin
    if (s_rxr && !s_al) begin
      `CHECK(dut.tx_data == 8'hBC && dut.tx_k, "slave fills K28.5 while unaligned")
      fills++;
    end
    if (s_al && u_m.send_state == hsio_pkg::SEND_COUNT && dut.tx_k == 0 && prev != 8'hBC) begin
      `CHECK(dut.tx_data == prev + 8'd1, $sformatf("slave repeats the count: %h after %h", dut.tx_data, prev))
      steps++;
    end
    prev = dut.tx_data;
  end
  `WATCHDOG(200000000)
  initial begin
    #1000 rst = 1; #50000 rst = 0;
    wait (s_txr && s_rxr);
    `CHECK(1, "slave reset sequence done")
    wait (s_al);
    `CHECK(1, "slave aligned")
    wait (lv && lb_lv);
    `CHECK(lat > lb_lat, $sformatf("ring latency %0d > loopback %0d", lat, lb_lat))
    wait (!meas);
    `CHECK(det > 10, $sformatf("master counted %0d packets through the slave", det))
    `CHECK(ec == 0, "no sequence errors")
    `CHECK(steps > 5000, $sformatf("slave repeated %0d count steps", steps))
    `CHECK(fills > 0, "fill characters seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
