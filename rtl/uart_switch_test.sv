// uart_switch_test: board-level test of the serial transmitter.
//
// The eight switches give the character to send (they should show a valid
// ASCII code), one push button sends it and another resets the
// transmitter. Each button goes through a mono pulse generator; the send
// pulse sets the TX_EN flip-flop, which the transmit FSM clears (through
// clr = not tx_rdy) once it has left idle, so one press sends exactly one
// 8N1 frame at 9600 baud. rst is a global synchronous reset (power-up);
// the reset button's pulse is ORed with it for the baud generator, the
// flip-flop and the FSM.
//
// Ports: clk, rst, btn_send, btn_rst, sw[7:0] in; tx (to the RX pin of the
// USB-UART module) and tx_rdy out.
module uart_switch_test #(
  parameter int unsigned DIVISOR       = uart_pkg::BAUD_DIVISOR,
  parameter int unsigned MPG_CNT_WIDTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_send,
  input  logic       btn_rst,
  input  logic [7:0] sw,
  output logic       tx,
  output logic       tx_rdy
);

  logic send_en, rst_en, tx_rst, baud_en, tx_en;

  mpg #(.CNT_WIDTH(MPG_CNT_WIDTH)) u_mpg_send (
    .clk(clk), .rst(rst), .btn(btn_send), .en(send_en)
  );

  mpg #(.CNT_WIDTH(MPG_CNT_WIDTH)) u_mpg_rst (
    .clk(clk), .rst(rst), .btn(btn_rst), .en(rst_en)
  );

  assign tx_rst = rst | rst_en;

  baud_gen #(.DIVISOR(DIVISOR)) u_baud (
    .clk(clk), .rst(tx_rst), .baud_en(baud_en)
  );

  tx_start_ff u_start (
    .clk(clk), .rst(tx_rst), .set(send_en), .clr(~tx_rdy), .q(tx_en)
  );

  tx_fsm u_tx (
    .clk    (clk),
    .rst    (tx_rst),
    .baud_en(baud_en),
    .tx_en  (tx_en),
    .tx_data(sw),
    .tx     (tx),
    .tx_rdy (tx_rdy)
  );

endmodule
