// time_counter: length of the measuring window.
// Counts cycles of the reference clock from the release of reset up to LIMIT,
// the measuring time divided by the clock period, and then stops with done
// high. The measurement blocks stop counting packets when done rises. With the
// evaluated 30 s window and the 50 MHz board oscillator LIMIT is 1.5e9 cycles.
// Interface: refclock, rst (asynchronous, active high), count[CW-1:0], done.
// Timing: done goes high LIMIT cycles after rst is released and stays high
// until the next reset.
module time_counter #(
  parameter longint unsigned LIMIT = 64'd1_500_000_000, // 30 s at 50 MHz
  parameter int unsigned CW = (LIMIT > 1) ? $clog2(LIMIT + 1) : 1
) (
  input  logic          refclock,
  input  logic          rst,
  output logic [CW-1:0] count,
  output logic          done
);
  always_ff @(posedge refclock or posedge rst) begin
    if (rst) begin
      count <= '0;
      done  <= 1'b0;
    end else if (!done) begin
      count <= count + 1'b1;
      if (count == CW'(LIMIT - 1)) done <= 1'b1;
    end
  end
endmodule
