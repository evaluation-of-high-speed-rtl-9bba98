// tb_lvds_deserializer: a 4-bit word stream is sent MSB first with a forwarded
// clock that rises with each MSB. The receiver must lock on the first rising
// forwarded-clock edge and then deliver the sent words exactly. Each bit-slip
// pulse must move the word boundary one bit later; after four slips the
// boundary is back on the sent words.
`timescale 1ns/1ps
module tb_lvds_deserializer;
`include "tb_check.svh"
  logic fast = 0, rst = 0, sin = 0, inclk = 0, align = 0;
  logic [3:0] rout;
  logic routclk, locked;
  always #1 fast = ~fast;
  lvds_deserializer #(.FACTOR(4)) dut (.fast_clk(fast), .rst(rst), .rx_in(sin),
    .rx_inclock(inclk), .rx_data_align(align), .rx_out(rout), .rx_outclock(routclk),
    .rx_locked(locked));

  // transmitter model: bit k of the stream is driven after fast edge k
  logic [3:0] word_q [$];
  logic       samp [100000];
  int nsent = 0, nsamp = 0;
  logic [3:0] cur;
  int bpos = 0;
  bit sending = 0;
  always @(posedge fast) begin
    samp[nsamp] = sin;      // what the receiver samples on this edge
    nsamp++;
    if (sending) begin
      if (bpos == 0) begin cur = 4'($urandom); word_q.push_back(cur); end
      #0.2;
      sin   = cur[3 - bpos];
      inclk = (bpos < 2);
      bpos  = (bpos + 1) % 4;
    end
  end

  // checker: every new word must be the last four sampled bits, MSB first
  int phase0 = -1, nword = 0, slips = 0, bad = 0, nexact = 0;
  // count captures via the capture condition seen from outside: rx_out updates
  logic [3:0] rout_q;
  int ncap = 0;
  int settle = 0;
  bit synced = 0;
  int widx = 0;
  always @(posedge routclk) begin
    // rx_outclock rises two bits after each capture; the word ended 2 samples ago
    automatic int e = nsamp - 3;
    automatic logic [3:0] w = {samp[e-3], samp[e-2], samp[e-1], samp[e]};
    if (settle > 0) settle--;
    else if (locked && ncap > 4) begin
      if (slips == 0) begin
        // before any slip the words are the sent words, in order
        checks++;
        if (!synced) begin
          for (int k = word_q.size() - 1; k >= word_q.size() - 3 && k >= 0; k--) if (!synced && word_q[k] === rout) begin widx = k; synced = 1; end
          if (!synced) begin failures++; $display("FAIL: not a sent word"); end
        end else begin
          widx++;
          if (widx >= word_q.size() || word_q[widx] !== rout) begin
            failures++; $display("FAIL: word %0d is %h, sent %h", widx, rout, word_q[widx]);
          end
        end
      end
      checks++;
      if (rout !== w) begin failures++; bad++; $display("FAIL: word %0d got %h want %h", ncap, rout, w); end
      if (phase0 < 0) phase0 = e % 4;
      checks++;
      if ((e % 4) != (phase0 + slips) % 4) begin failures++; $display("FAIL: boundary phase"); end
    end
    ncap++;
  end

  `WATCHDOG(100000)
  initial begin
    #1 rst = 1;
    repeat (3) @(posedge fast);
    #0.3 rst = 0;
    repeat (5) @(posedge fast);
    sending = 1;
    wait (locked);
    `CHECK(1, "locked")
    repeat (200) @(posedge fast);
    // sent words must come out exactly (boundary at the forwarded clock edge)
    `CHECK(phase0 >= 0, "words captured")
    repeat (4) begin
      @(posedge fast) #0.3 align = 1;
      slips++;
      settle = 2;
      repeat (3) @(posedge fast);
      #0.3 align = 0;
      repeat (60) @(posedge fast);
    end
    `CHECK(slips == 4, "four slips")
    `CHECK(ncap > 100, "enough words")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
