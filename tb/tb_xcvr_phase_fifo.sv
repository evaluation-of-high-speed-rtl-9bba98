// tb_xcvr_phase_fifo: writer and reader run on clocks of the same rate but
// different phase (and then a faster reader); every word written comes out
// once, in order. With the reader stopped the FIFO must report full after
// DEPTH words and raise overflow on the next write.
`timescale 1ns/1ps
module tb_xcvr_phase_fifo;
`include "tb_check.svh"
  logic rst = 0, wclk = 0, rclk = 0, we = 0, re = 0;
  logic [7:0] wd = 0, rdat;
  logic full, ovf, rv;
  realtime rhalf = 5.0;
  always #5 wclk = ~wclk;
  initial begin #3.3; forever #(rhalf) rclk = ~rclk; end
  xcvr_phase_fifo #(.W(8), .DEPTH(8)) dut (.rst(rst), .wr_clk(wclk), .wr_en(we), .wr_data(wd),
      .full(full), .overflow(ovf), .rd_clk(rclk), .rd_en(re), .rd_data(rdat), .rd_valid(rv));
  int exp_v = 0, got = 0;
  always @(posedge rclk) if (rv) begin
    `CHECK(rdat == 8'(exp_v), $sformatf("read %h want %h", rdat, 8'(exp_v)))
    exp_v++; got++;
  end
  `WATCHDOG(1000000)
  initial begin
    #1 rst = 1; #20 rst = 0;
    re = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge wclk); we = 1; wd = 8'(i);
    end
    @(negedge wclk); we = 0;
    repeat (20) @(posedge wclk);
    `CHECK(got == 500, $sformatf("all words out: %0d", got))
    `CHECK(!ovf, "no overflow with reader running")
    // faster reader, bursty writer
    rhalf = 3.0;
    for (int i = 500; i < 1000; i++) begin
      @(negedge wclk); we = ($urandom % 3 != 0); wd = 8'(exp_v + (got - exp_v));
      if (!we) i--; else wd = 8'(i);
    end
    @(negedge wclk); we = 0;
    repeat (20) @(posedge wclk);
    `CHECK(got == 1000, $sformatf("all words out after burst: %0d", got))
    // fill with reader stopped
    re = 0; repeat (5) @(posedge rclk);
    for (int i = 0; i < 8; i++) begin
      @(negedge wclk); `CHECK(!full, $sformatf("not full before word %0d", i)); we = 1; wd = 8'(1000 + i);
    end
    @(negedge wclk); we = 0;
    @(negedge wclk); `CHECK(full, "full after DEPTH words");
    `CHECK(!ovf, "no overflow yet");
    we = 1; @(negedge wclk); we = 0;
    @(negedge wclk); `CHECK(ovf, "overflow on write when full")
    re = 1; repeat (30) @(posedge rclk);
    `CHECK(got == 1008, $sformatf("stored words read back: %0d", got))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
