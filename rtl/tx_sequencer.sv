// tx_sequencer: sends a 16-bit value as four hexadecimal characters.
//
// A 16-bit word needs four serial transfers, one ASCII character per 4-bit
// digit. On a start pulse the word is copied into a holding register
// (so the source may change meanwhile) and the digits are sent most
// significant first, as the number is read. For each digit the sequencer
//   REQ      : pulses tx_go for one cycle (sets the TX_EN flip-flop),
//   WAIT_BSY : waits for tx_rdy = 0, i.e. the transmit FSM took the frame,
//   WAIT_RDY : waits for tx_rdy = 1, i.e. the stop bit has been sent,
// then moves to the next digit, or returns to idle and pulses done after
// the last one. digit holds the current 4-bit digit stable for the whole
// frame; it feeds the hex-to-ASCII decoder in front of the transmitter.
// A start pulse while busy is ignored.
//
// Pacing the four transfers with TX_RDY follows the lab; the digit order,
// the holding register and the state names are this design's choices.
// rst is synchronous and active high.
module tx_sequencer #(
  parameter int unsigned N_DIGITS = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [4*N_DIGITS-1:0] data,
  input  logic                  tx_rdy,
  output logic [3:0]            digit,
  output logic                  tx_go,
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [1:0] {
    SQ_IDLE     = 2'd0,
    SQ_REQ      = 2'd1,
    SQ_WAIT_BSY = 2'd2,
    SQ_WAIT_RDY = 2'd3
  } seq_state_t;

  localparam int unsigned IW = (N_DIGITS > 1) ? $clog2(N_DIGITS) : 1;

  seq_state_t            state;
  logic [4*N_DIGITS-1:0] hold;
  logic [IW-1:0]         idx;   // 0 = most significant digit

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SQ_IDLE;
      hold  <= '0;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SQ_IDLE: if (start) begin
          hold  <= data;
          idx   <= '0;
          state <= SQ_REQ;
        end
        SQ_REQ:      state <= SQ_WAIT_BSY;
        SQ_WAIT_BSY: if (!tx_rdy) state <= SQ_WAIT_RDY;
        SQ_WAIT_RDY: if (tx_rdy) begin
          if (idx == IW'(N_DIGITS - 1)) begin
            state <= SQ_IDLE;
            done  <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= SQ_REQ;
          end
        end
        default: state <= SQ_IDLE;
      endcase
    end
  end

  assign digit = hold[4*(N_DIGITS-1-int'(idx)) +: 4];
  assign tx_go = (state == SQ_REQ);
  assign busy  = (state != SQ_IDLE);

endmodule
