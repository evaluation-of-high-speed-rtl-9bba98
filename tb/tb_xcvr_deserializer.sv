// tb_xcvr_deserializer: a random bit stream is sent on the serial line; every
// word on par_out (sampled at the rising edge of rx_clkout) must be the next
// 10 bits of the stream, first bit in bit 0, with no bit lost or repeated, and
// rx_clkout must have a period of exactly WIDTH serial clocks.
`timescale 1ns/1ps
module tb_xcvr_deserializer;
`include "tb_check.svh"
  logic sclk = 0, rst = 0, si = 0, pclk;
  logic [9:0] pout;
  always #1 sclk = ~sclk;
  xcvr_deserializer #(.WIDTH(10)) dut (.serial_clk(sclk), .rst(rst), .ser_in(si), .par_out(pout), .rx_clkout(pclk));
  logic bits [$];
  logic [9:0] words [$];
  realtime last = 0;
  always @(negedge sclk) begin si = 1'($urandom); if (!rst) bits.push_back(si); end
  always @(posedge pclk) begin
    if (last > 0) `CHECK($realtime - last == 20.0, "rx_clkout period 10 serial clocks")
    last = $realtime;
    words.push_back(pout);
  end
  `WATCHDOG(100000)
  initial begin
    int off;
    #0.5 rst = 1; #10 rst = 0;
    #4000;
    off = -1;
    for (int o = 0; o < 40 && off < 0; o++) begin
      bit m; m = 1;
      for (int w = 2; w < 6; w++) for (int b = 0; b < 10; b++)
        if (bits[o + 10 * (w - 2) + b] !== words[w][b]) m = 0;
      if (m) off = o;
    end
    `CHECK(off >= 0, $sformatf("word boundary found at %0d", off))
    if (off >= 0)
      for (int w = 2; w < words.size() - 1; w++)
        for (int b = 0; b < 10; b++)
          `CHECK(words[w][b] === bits[off + 10 * (w - 2) + b], $sformatf("word %0d bit %0d", w, b))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
