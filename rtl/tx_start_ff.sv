// tx_start_ff: D flip-flop with set and reset that turns a one-cycle start
// pulse into a TX_EN level the transmit FSM cannot miss.
//
// The transmit FSM samples tx_en only on baud_en cycles, up to one bit time
// apart, so a single-cycle request (a button pulse or a sequencer strobe)
// has to be held. set = 1 stores a 1; clr = 1 stores a 0. The intended
// wiring is clr = not tx_rdy: the flag drops as soon as the FSM has left
// idle, so exactly one frame is sent per request. clr wins over set, so a
// request that arrives while a frame is being sent is ignored. rst is a
// synchronous, active-high reset. The lab asks for "a D flip-flop with a
// set and a reset"; the priority and the clr wiring are this design's
// choices.
module tx_start_ff (
  input  logic clk,
  input  logic rst,
  input  logic set,
  input  logic clr,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= 1'b0;
    else if (set)   q <= 1'b1;
  end

endmodule
