// lab11_top: the laboratory's hardware side by side.
//
//   * mips_uart_tx     - the main design: captures a 16-bit result from the
//                        processor (pc, wdata come from the processor, which
//                        is outside this RTL) and sends it as four ASCII hex
//                        characters on tx.
//   * uart_switch_test - the first board test of the transmitter: the
//                        character on the switches is sent once per press of
//                        btn_send; its line is sw_tx.
//   * uart_rx          - a 16x oversampling receiver on the rx pin (the
//                        USB-UART module's TX), delivering rx_data/rx_valid.
//   * fsm_example      - the four-state example state machine, with its own
//                        asynchronous reset.
// All parts share clk; rst is a synchronous, active-high reset for the
// serial parts. The tx line goes to the RX pin of the USB-UART module and
// the rx pin comes from its TX pin. The two transmitters are separate
// exercises and are brought out on separate pins.
module lab11_top #(
  parameter int unsigned DIVISOR       = uart_pkg::BAUD_DIVISOR,
  parameter int unsigned RX_TICK_DIV   = uart_pkg::RX_TICK_DIV,
  parameter int unsigned MPG_CNT_WIDTH = 16,
  parameter logic [15:0] CAPTURE_PC    = 16'h0020
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic [15:0] pc,
  input  logic [15:0] wdata,
  output logic        tx,
  output logic        tx_rdy,
  output logic        tx_busy,
  output logic        tx_done,
  output logic [15:0] result,
  // switch test
  input  logic        btn_send,
  input  logic        btn_rst,
  input  logic [7:0]  sw,
  output logic        sw_tx,
  output logic        sw_tx_rdy,
  // receiver
  input  logic        rx,
  output logic [7:0]  rx_data,
  output logic        rx_valid,
  output logic        rx_ferr,
  // example state machine
  input  logic        fsm_reset,
  input  logic        fsm_x1,
  output logic        fsm_outp
);

  mips_uart_tx #(.DIVISOR(DIVISOR), .CAPTURE_PC(CAPTURE_PC)) u_mips_tx (
    .clk   (clk),
    .rst   (rst),
    .pc    (pc),
    .wdata (wdata),
    .tx    (tx),
    .tx_rdy(tx_rdy),
    .busy  (tx_busy),
    .done  (tx_done),
    .result(result)
  );

  uart_switch_test #(.DIVISOR(DIVISOR), .MPG_CNT_WIDTH(MPG_CNT_WIDTH)) u_sw_test (
    .clk     (clk),
    .rst     (rst),
    .btn_send(btn_send),
    .btn_rst (btn_rst),
    .sw      (sw),
    .tx      (sw_tx),
    .tx_rdy  (sw_tx_rdy)
  );

  uart_rx #(.TICK_DIV(RX_TICK_DIV)) u_rx (
    .clk     (clk),
    .rst     (rst),
    .rx      (rx),
    .rx_data (rx_data),
    .rx_valid(rx_valid),
    .rx_ferr (rx_ferr)
  );

  fsm_example u_fsm (
    .clk  (clk),
    .reset(fsm_reset),
    .x1   (fsm_x1),
    .outp (fsm_outp)
  );

endmodule
