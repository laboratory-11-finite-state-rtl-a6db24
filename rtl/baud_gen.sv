// baud_gen: baud rate generator.
//
// A free-running counter divides the system clock by DIVISOR and raises
// baud_en for exactly one clock cycle every DIVISOR cycles, i.e. once per
// bit time. With the default 50 MHz clock and DIVISOR = 5208 this gives
// 9600.6 bit periods per second; 25 MHz and 100 MHz clocks take 2604 and
// 10416. The counter wraps from DIVISOR-1 to 0 and the pulse is issued on
// the cycle in which it holds DIVISOR-1. Reset clears the counter, so the
// first pulse comes DIVISOR-1 clock edges after the edge that ends reset,
// and every DIVISOR cycles after that.
//
// Interface: clk, synchronous active-high rst, output baud_en.
// The synchronous reset is this design's choice; the lab text only asks
// for "a counter" that generates a '1' every bit time interval.
module baud_gen #(
  parameter int unsigned DIVISOR = uart_pkg::BAUD_DIVISOR
) (
  input  logic clk,
  input  logic rst,
  output logic baud_en
);

  localparam int unsigned W = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
    end else if (cnt == W'(DIVISOR - 1)) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign baud_en = (cnt == W'(DIVISOR - 1));

endmodule
