// mips_uart_tx: serial output unit for a 16-bit MIPS processor.
//
// Sends the processor's final result to a PC terminal as four ASCII
// hexadecimal characters. The chain is:
//   result_reg   loads RD1/ALURes while PC = CAPTURE_PC and pulses start
//   tx_sequencer walks the four digits, most significant first
//   hex_ascii    turns the current digit into its ASCII code (TX_DATA)
//   tx_start_ff  holds each one-cycle request as TX_EN until taken
//   tx_fsm       sends one 8N1 frame per request at the baud_gen rate
// The sequencer waits for tx_rdy to fall and rise again between digits,
// so the four frames follow each other with at most one bit time of idle
// line between them. A whole word takes about 4 x 10 bit times (4.2 ms at
// 9600 baud).
//
// Ports: clk, rst (synchronous, active high), pc and wdata from the
// processor; tx (serial line), tx_rdy, busy (word in progress) and done
// (one-cycle pulse after the last stop bit).
// Two assertions state the handshake rules between the sequencer and the
// transmitter: a request is only made while the transmitter is idle, and
// the character on tx_data does not change while a frame is on the line.
module mips_uart_tx #(
  parameter int unsigned DIVISOR    = uart_pkg::BAUD_DIVISOR,
  parameter logic [15:0] CAPTURE_PC = 16'h0020
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] pc,
  input  logic [15:0] wdata,
  output logic        tx,
  output logic        tx_rdy,
  output logic        busy,
  output logic        done,
  output logic [15:0] result
);

  logic       start, baud_en, tx_go, tx_en;
  logic [3:0] digit;
  logic [7:0] tx_data;

  result_reg #(.WIDTH(16), .PC_WIDTH(16), .CAPTURE_PC(CAPTURE_PC)) u_result (
    .clk(clk), .rst(rst), .pc(pc), .wdata(wdata), .q(result), .start(start)
  );

  tx_sequencer #(.N_DIGITS(4)) u_seq (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .data  (result),
    .tx_rdy(tx_rdy),
    .digit (digit),
    .tx_go (tx_go),
    .busy  (busy),
    .done  (done)
  );

  hex_ascii u_hex (.digit(digit), .ascii(tx_data));

  baud_gen #(.DIVISOR(DIVISOR)) u_baud (
    .clk(clk), .rst(rst), .baud_en(baud_en)
  );

  tx_start_ff u_start (
    .clk(clk), .rst(rst), .set(tx_go), .clr(~tx_rdy), .q(tx_en)
  );

  tx_fsm u_tx (
    .clk    (clk),
    .rst    (rst),
    .baud_en(baud_en),
    .tx_en  (tx_en),
    .tx_data(tx_data),
    .tx     (tx),
    .tx_rdy (tx_rdy)
  );

  // The sequencer only requests a frame while the transmitter is idle.
  a_go_when_idle: assert property (@(posedge clk) disable iff (rst) tx_go |-> tx_rdy)
    else $error("frame requested while the transmitter is busy");

  // TX_DATA is read live by the FSM, so it must hold for the whole frame.
  a_data_stable: assert property (@(posedge clk) disable iff (rst)
                                  (!tx_rdy && $past(!tx_rdy)) |-> $stable(tx_data))
    else $error("tx_data changed during a frame");

endmodule
