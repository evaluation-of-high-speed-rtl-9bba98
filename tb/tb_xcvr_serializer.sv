// tb_xcvr_serializer: random 10-bit words are presented on every rising edge
// of tx_clkout; the serial line sampled on every serial clock must carry the
// words back to back, bit 0 first, and tx_clkout must have a period of exactly
// WIDTH serial clocks.
`timescale 1ns/1ps
module tb_xcvr_serializer;
`include "tb_check.svh"
  logic sclk = 0, rst = 0, so, pclk;
  logic [9:0] pin = 0;
  always #1 sclk = ~sclk;
  xcvr_serializer #(.WIDTH(10)) dut (.serial_clk(sclk), .rst(rst), .par_in(pin), .ser_out(so), .tx_clkout(pclk));
  logic [9:0] words [$];
  logic bits [$];
  realtime last = 0;
  int periods = 0;
  always @(posedge pclk) begin
    if (last > 0 && periods++ > 0) begin `CHECK($realtime - last == 20.0, "tx_clkout period 10 serial clocks") end
    last = $realtime;
    #0.5 pin = 10'($urandom); words.push_back(pin);
  end
  always @(posedge sclk) if (!rst) bits.push_back(so);
  `WATCHDOG(100000)
  initial begin
    int off;
    #0.5 rst = 1; #10 rst = 0;
    #4000;
    off = -1;
    for (int o = 0; o < 30 && off < 0; o++) begin
      bit m; m = 1;
      for (int b = 0; b < 10; b++) if (bits[o + b] !== words[0][b]) m = 0;
      for (int b = 0; b < 10; b++) if (bits[o + 10 + b] !== words[1][b]) m = 0;
      if (m) off = o;
    end
    `CHECK(off >= 0 && off < 20, $sformatf("first word found at bit %0d", off))
    if (off >= 0)
      for (int w = 0; w < words.size() - 2; w++)
        for (int b = 0; b < 10; b++)
          `CHECK(bits[off + 10 * w + b] === words[w][b], $sformatf("word %0d bit %0d", w, b))
    `CHECK(periods > 150, "parallel clock running")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
