// uart_pkg: constants and state types shared by the serial transmitter,
// receiver and the 16-bit hexadecimal sender.
//
// The line format is fixed at 1 start bit, 8 data bits sent LSB first, no
// parity and 1 stop bit, at 9600 baud, which is the format the laboratory
// asks for. The board clock defaults to 50 MHz, one of the three rates the
// divider table lists (25, 50 and 100 MHz divide by 2604, 5208 and 10416).
// The divider is the integer part of CLK_HZ / BAUD, which reproduces all
// three table entries. The receiver tick (16x the baud rate) is this
// design's own addition to the table: 50e6 / (16 * 9600) = 325.5 -> 325.
package uart_pkg;

  parameter int unsigned CLK_HZ       = 50_000_000;
  parameter int unsigned BAUD         = 9600;
  parameter int unsigned BAUD_DIVISOR = CLK_HZ / BAUD;          // 5208
  parameter int unsigned OVERSAMPLE   = 16;
  parameter int unsigned RX_TICK_DIV  = CLK_HZ / (BAUD * OVERSAMPLE); // 325

  // Transmit FSM states, as drawn in the TX_FSM state diagram.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,
    TX_START = 2'd1,
    TX_BIT   = 2'd2,
    TX_STOP  = 2'd3
  } tx_state_t;

  // Receiver states (16x oversampling receiver).
  typedef enum logic [1:0] {
    RX_IDLE  = 2'd0,
    RX_START = 2'd1,
    RX_DATA  = 2'd2,
    RX_STOP  = 2'd3
  } rx_state_t;

endpackage
