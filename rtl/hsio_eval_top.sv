// hsio_eval_top: the two inter-board link evaluations side by side.
//  * LVDS point-to-point: lvds_master sends the 0..15 sequence over one LVDS
//    data channel plus a forwarded clock to lvds_slave, which counts the
//    2048-bit packets it receives in a fixed window (bandwidth test).
//  * Transceiver ring: xcvr_master sends K28.5 until the ring is aligned, then
//    an 8-bit count, through xcvr_slave 1 and xcvr_slave 2 and back to itself;
//    it counts returned packets (bandwidth) and times the trip (latency).
// The cables between the boards are the wires inside this module. The serial
// clocks come from PLLs and CDRs that are not logic and enter as ports: one
// transmit and one recovered clock per transceiver board, one fast clock per
// LVDS board. Each board has its own reset, so a single board can be reset
// while the others run.
module hsio_eval_top #(
  parameter int unsigned     LVDS_FACTOR = 4,
  parameter longint unsigned TIME_LIMIT  = 64'd1_500_000_000,
  parameter int unsigned     LOCK_CYCLES = 200,
  parameter int unsigned     LTD_CYCLES  = 400,
  parameter int unsigned     CAL_CYCLES  = 100,
  parameter int unsigned     K_TIMEOUT   = 256
) (
  // LVDS link
  input  logic                   lvds_tx_fast_clk,
  input  logic                   lvds_rx_fast_clk,
  input  logic                   lvds_ref_clk,
  input  logic                   lvds_master_rst,
  input  logic                   lvds_slave_rst,
  input  logic                   lvds_rx_data_align,
  output logic [LVDS_FACTOR-1:0] lvds_out_rx,
  output logic [25:0]            lvds_number_ok,
  output logic [15:0]            lvds_number_err,
  output logic                   lvds_measuring,
  output logic                   lvds_rx_locked,
  // transceiver ring
  input  logic [2:0]             xcvr_tx_serial_clk,   // 0 master, 1 slave 1, 2 slave 2
  input  logic [2:0]             xcvr_rx_serial_clk,
  input  logic                   xcvr_mgmt_clk,
  input  logic                   xcvr_ref_clk,
  input  logic [2:0]             xcvr_rst,
  output logic [7:0]             xcvr_out_data,
  output logic [27:0]            xcvr_detout_s,
  output logic [15:0]            xcvr_err_count,
  output logic [15:0]            xcvr_latency,
  output logic                   xcvr_latency_valid,
  output logic                   xcvr_measuring,
  output logic [2:0]             xcvr_aligned,
  output logic [2:0]             xcvr_tx_ready,
  output logic [2:0]             xcvr_rx_ready,
  output logic [15:0]            xcvr_sync_entries
);
  // ---------------- LVDS point-to-point ----------------
  logic lvds_data, lvds_clk, lvds_coreclock;

  lvds_master #(.FACTOR(LVDS_FACTOR), .B(LVDS_FACTOR)) u_lvds_master (
    .fast_clk(lvds_tx_fast_clk), .rst(lvds_master_rst),
    .tx_out(lvds_data), .tx_outclk(lvds_clk), .tx_coreclock(lvds_coreclock));

  lvds_slave #(.FACTOR(LVDS_FACTOR), .TIME_LIMIT(TIME_LIMIT)) u_lvds_slave (
    .fast_clk(lvds_rx_fast_clk), .ref_clk(lvds_ref_clk), .rst(lvds_slave_rst),
    .rx_in(lvds_data), .rx_inclock(lvds_clk), .rx_data_align(lvds_rx_data_align),
    .out_rx(lvds_out_rx), .number_ok(lvds_number_ok), .number_err(lvds_number_err),
    .measuring(lvds_measuring), .rx_locked(lvds_rx_locked));

  // ---------------- transceiver ring ----------------
  logic [2:0] line;       // line[i] is the serial output of board i
  logic [7:0] s1_data, s2_data;

  xcvr_master #(.TIME_LIMIT(TIME_LIMIT), .LOCK_CYCLES(LOCK_CYCLES),
                .LTD_CYCLES(LTD_CYCLES), .CAL_CYCLES(CAL_CYCLES),
                .K_TIMEOUT(K_TIMEOUT)) u_xcvr_master (
    .tx_serial_clk(xcvr_tx_serial_clk[0]), .rx_serial_clk(xcvr_rx_serial_clk[0]),
    .mgmt_clk(xcvr_mgmt_clk), .ref_clk(xcvr_ref_clk), .rst(xcvr_rst[0]),
    .rx_serial_data(line[2]), .tx_serial_data(line[0]),
    .out_data(xcvr_out_data), .detout_s(xcvr_detout_s), .err_count(xcvr_err_count),
    .latency(xcvr_latency), .latency_valid(xcvr_latency_valid),
    .measuring(xcvr_measuring), .aligned(xcvr_aligned[0]),
    .tx_ready(xcvr_tx_ready[0]), .rx_ready(xcvr_rx_ready[0]),
    .sync_entries(xcvr_sync_entries));

  xcvr_slave #(.LOCK_CYCLES(LOCK_CYCLES), .LTD_CYCLES(LTD_CYCLES),
               .CAL_CYCLES(CAL_CYCLES)) u_xcvr_slave1 (
    .tx_serial_clk(xcvr_tx_serial_clk[1]), .rx_serial_clk(xcvr_rx_serial_clk[1]),
    .mgmt_clk(xcvr_mgmt_clk), .rst(xcvr_rst[1]),
    .rx_serial_data(line[0]), .tx_serial_data(line[1]), .out_data(s1_data),
    .aligned(xcvr_aligned[1]), .tx_ready(xcvr_tx_ready[1]), .rx_ready(xcvr_rx_ready[1]));

  xcvr_slave #(.LOCK_CYCLES(LOCK_CYCLES), .LTD_CYCLES(LTD_CYCLES),
               .CAL_CYCLES(CAL_CYCLES)) u_xcvr_slave2 (
    .tx_serial_clk(xcvr_tx_serial_clk[2]), .rx_serial_clk(xcvr_rx_serial_clk[2]),
    .mgmt_clk(xcvr_mgmt_clk), .rst(xcvr_rst[2]),
    .rx_serial_data(line[1]), .tx_serial_data(line[2]), .out_data(s2_data),
    .aligned(xcvr_aligned[2]), .tx_ready(xcvr_tx_ready[2]), .rx_ready(xcvr_rx_ready[2]));
endmodule
