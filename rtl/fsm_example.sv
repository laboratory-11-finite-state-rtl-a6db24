// fsm_example: the four-state example machine used to show how a state
// machine is split into a state register, a next-state function and an
// output function.
//
//   s1 --x1=1--> s2 --> s4 --> s1
//   s1 --x1=0--> s3 --> s4
// The output is a Moore output: outp = 1 in s1 and s2, 0 in s3 and s4.
// reset is asynchronous and active high and forces s1; the state advances
// on the rising edge of clk. Written in the three-process form (register,
// next state, output), so outp follows the state with no extra register.
module fsm_example (
  input  logic clk,
  input  logic reset,
  input  logic x1,
  output logic outp
);

  typedef enum logic [1:0] {S1, S2, S3, S4} fsm_state_t;

  fsm_state_t state, next_state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= S1;
    else       state <= next_state;
  end

  always_comb begin
    unique case (state)
      S1:      next_state = x1 ? S2 : S3;
      S2:      next_state = S4;
      S3:      next_state = S4;
      S4:      next_state = S1;
      default: next_state = S1;
    endcase
  end

  always_comb begin
    unique case (state)
      S1, S2:  outp = 1'b1;
      default: outp = 1'b0;
    endcase
  end

endmodule
