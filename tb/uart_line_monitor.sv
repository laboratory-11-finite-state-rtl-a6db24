// uart_line_monitor: testbench-only observer of an 8N1 serial line.
//
// Waits for a falling edge on an idle-high line, then follows the frame
// with a bit period of exactly BIT_CYCLES clocks: it samples every bit in
// its middle (start, 8 data bits LSB first, stop) and also checks that the
// line never changes inside a bit, so a bit that is one clock too long or
// too short is reported. At the middle of the stop bit it pulses valid for
// one clock with the received byte in data; err is 1 in that cycle if the
// start bit was not low, the stop bit was not high or the line moved
// inside a bit. While rst is 1 the monitor is held idle, so the random
// line level of a design that has not been reset yet is ignored.
module uart_line_monitor #(
  parameter int unsigned BIT_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       line,
  output logic       valid,
  output logic [7:0] data,
  output logic       err
);

  logic       busy = 1'b0;
  logic       prev = 1'b1;
  int unsigned t = 0;          // cycles since the falling edge of the start bit
  logic       level;           // level expected for the current bit
  logic       bad;
  logic [7:0] sh;

  initial begin
    valid = 1'b0;
    data  = '0;
    err   = 1'b0;
  end

  always @(posedge clk) begin
    valid <= 1'b0;
    err   <= 1'b0;
    prev  <= line;
    if (rst) begin
      busy <= 1'b0;
      prev <= 1'b1;
    end else if (!busy) begin
      if (prev && !line) begin
        busy  <= 1'b1;
        t     <= 1;
        level <= 1'b0;
        bad   <= 1'b0;
      end
    end else begin
      t <= t + 1;
      // at a bit boundary the line may take a new level
      if (t % BIT_CYCLES == 0) level <= line;
      else if (line != level) bad <= 1'b1;
      if (t % BIT_CYCLES == BIT_CYCLES / 2) begin
        unique case (t / BIT_CYCLES)
          0: if (line != 1'b0) bad <= 1'b1;
          1, 2, 3, 4, 5, 6, 7, 8: sh <= {line, sh[7:1]};
          default: begin
            valid <= 1'b1;
            data  <= sh;
            err   <= bad | (line != 1'b1);
            busy  <= 1'b0;
          end
        endcase
      end
    end
  end

endmodule
