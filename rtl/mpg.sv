// mpg: mono pulse generator for a push button.
//
// Turns a bouncing, asynchronous button level into an enable that is 1 for
// exactly one clock cycle per press. A free-running CNT_WIDTH-bit counter
// sets the sampling rate: the button is sampled into q1 only when the
// counter is all ones (every 2^16 cycles, 1.3 ms at 50 MHz, by default),
// which rides out contact bounce. q1 is then delayed into q2 and q3 on
// every clock and en = q2 and not q3 marks the rising edge, so a press
// gives one pulse between 2 and 2^CNT_WIDTH + 2 cycles after it is seen.
// The lab only names this block; its structure and the counter width are
// this design's choice. rst (synchronous, active high) clears the
// registers so no pulse appears after power-up.
module mpg #(
  parameter int unsigned CNT_WIDTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic en
);

  logic [CNT_WIDTH-1:0] cnt;
  logic q1, q2, q3;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      q1  <= 1'b0;
      q2  <= 1'b0;
      q3  <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (&cnt) q1 <= btn;
      q2 <= q1;
      q3 <= q2;
    end
  end

  assign en = q2 & ~q3;

endmodule
