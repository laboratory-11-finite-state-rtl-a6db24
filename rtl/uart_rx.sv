// uart_rx: serial receiver with 16x oversampling.
//
// The line is sampled on a tick that runs at 16 times the baud rate
// (TICK_DIV clock cycles per tick). After a two-stage synchronizer:
//   RX_IDLE : wait for the line to go low (possible start bit)
//   RX_START: count 8 ticks to the middle of the start bit; if the line is
//             still low the frame is accepted, otherwise it was a glitch
//   RX_DATA : every 16 ticks, in the middle of each bit, shift one sample
//             into the data register, LSB first, 8 bits
//   RX_STOP : 16 ticks later sample the stop bit; rx_valid pulses for one
//             clock with rx_data, and rx_ferr is set in the same cycle if
//             the stop bit was 0 (framing error)
// Only one of the 16 samples of each bit is kept, the one nearest its
// middle. The frame format is 8N1 as for the transmitter. The oversampling
// rate and the idea of sampling mid-bit come from the lab's background on
// serial communication; the state machine, the glitch check and the
// framing-error flag are this design's choices. rst is synchronous, active
// high.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned TICK_DIV = uart_pkg::RX_TICK_DIV
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_ferr
);

  logic       tick;
  logic       rx_s1, rx_s2;
  rx_state_t  state;
  logic [3:0] tcnt;    // ticks within the current bit
  logic [2:0] bcnt;    // data bits received
  logic [7:0] shreg;

  baud_gen #(.DIVISOR(TICK_DIV)) u_tick (
    .clk    (clk),
    .rst    (rst),
    .baud_en(tick)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_s1 <= 1'b1;
      rx_s2 <= 1'b1;
    end else begin
      rx_s1 <= rx;
      rx_s2 <= rx_s1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= RX_IDLE;
      tcnt     <= '0;
      bcnt     <= '0;
      shreg    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_ferr  <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      rx_ferr  <= 1'b0;
      if (tick) begin
        unique case (state)
          RX_IDLE: begin
            tcnt <= '0;
            if (!rx_s2) state <= RX_START;
          end
          RX_START: begin
            if (tcnt == 4'd7) begin
              tcnt <= '0;
              bcnt <= '0;
              state <= rx_s2 ? RX_IDLE : RX_DATA;
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          end
          RX_DATA: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              shreg <= {rx_s2, shreg[7:1]};
              bcnt  <= bcnt + 1'b1;
              if (bcnt == 3'd7) state <= RX_STOP;
            end
          end
          RX_STOP: begin
            tcnt <= tcnt + 1'b1;
            if (tcnt == 4'd15) begin
              rx_data  <= shreg;
              rx_valid <= 1'b1;
              rx_ferr  <= ~rx_s2;
              state    <= RX_IDLE;
            end
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule
