// tb_xcvr_data_from_rx: while aligned, each valid received byte goes out one
// cycle later unchanged; while not aligned (or on an invalid cycle) the output
// is the K28.5 fill character.
`timescale 1ns/1ps
module tb_xcvr_data_from_rx;
`include "tb_check.svh"
  logic clk = 0, rst = 0, al = 0, v = 0, k = 0;
  logic [7:0] d = 0, od;
  logic ok;
  always #4 clk = ~clk;
  xcvr_data_from_rx dut (.refclock(clk), .rst(rst), .aligned(al), .rx_valid(v),
    .rx_data_in(d), .rx_k_in(k), .out_data(od), .out_k(ok));
  `WATCHDOG(100000)
  initial begin
    logic [7:0] ed; logic ek;
    #1 rst = 1; #20 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      al = (i / 200) % 2 == 1 || $urandom % 50 == 0;
      v = $urandom % 10 != 0; d = 8'($urandom); k = $urandom % 8 == 0;
      if (al && v) begin ed = d; ek = k; end else begin ed = 8'hBC; ek = 1; end
      @(posedge clk); #1;
      `CHECK(od == ed && ok == ek, $sformatf("cycle %0d: %h/%b want %h/%b", i, od, ok, ed, ek))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
