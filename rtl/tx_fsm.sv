// tx_fsm: serial transmit state machine (TX_FSM).
//
// Four states, idle -> start -> bit (x8) -> stop -> idle, following the
// lab's state diagram. The state register only moves on a clock edge in
// which baud_en is 1, so every line level is held for one full bit time.
//   idle : tx = 1, tx_rdy = 1; leaves for start when tx_en = 1
//   start: tx = 0 (start bit)
//   bit  : tx = tx_data[bit_cnt]; bit_cnt counts 0..7 and the FSM stays
//          here while bit_cnt < 7, then goes to stop
//   stop : tx = 1 (one stop bit), then back to idle
// Outputs are Moore outputs decoded from the state (and bit_cnt). bit_cnt
// advances in the bit state and is cleared in every other state. The code
// keeps the three parts of a state machine apart: state register,
// next-state function and output function.
//
// A frame takes 10 bit times. Because stop always returns to idle and idle
// is left only on the next baud_en, frames sent back to back (tx_en held
// high) are 11 bit times apart: 872 characters per second at 9600 baud,
// against the 960 a 10-bit frame would allow on the line.
// tx_data is used directly, not copied, as the diagram shows it: the
// driver must hold it stable from tx_en until tx_rdy returns to 1.
// rst is synchronous and active high (the diagram only shows RST = 1
// forcing idle; the synchronous style is this design's choice).
module tx_fsm
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_en,
  input  logic       tx_en,
  input  logic [7:0] tx_data,
  output logic       tx,
  output logic       tx_rdy
);

  tx_state_t  state, state_n;
  logic [2:0] bit_cnt;

  // State register and bit counter
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= TX_IDLE;
      bit_cnt <= '0;
    end else if (baud_en) begin
      state <= state_n;
      if (state == TX_BIT) bit_cnt <= bit_cnt + 1'b1;
      else                 bit_cnt <= '0;
    end
  end

  // Next-state function
  always_comb begin
    state_n = state;
    unique case (state)
      TX_IDLE:  if (tx_en) state_n = TX_START;
      TX_START: state_n = TX_BIT;
      TX_BIT:   if (bit_cnt == 3'd7) state_n = TX_STOP;
      TX_STOP:  state_n = TX_IDLE;
      default:  state_n = TX_IDLE;
    endcase
  end

  // Output function
  always_comb begin
    unique case (state)
      TX_IDLE:  begin tx = 1'b1;             tx_rdy = 1'b1; end
      TX_START: begin tx = 1'b0;             tx_rdy = 1'b0; end
      TX_BIT:   begin tx = tx_data[bit_cnt]; tx_rdy = 1'b0; end
      TX_STOP:  begin tx = 1'b1;             tx_rdy = 1'b0; end
      default:  begin tx = 1'b1;             tx_rdy = 1'b0; end
    endcase
  end

endmodule
