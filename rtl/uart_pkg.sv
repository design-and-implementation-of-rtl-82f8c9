// uart_pkg: constants and state types shared by the UART blocks.
//
// The frame is the reduced RS-232 format: one start bit (0), eight data bits
// sent least significant bit first, no parity bit and one stop bit (1), so ten
// bit periods per character. A bit period is given as a count of system clock
// cycles. 5208 cycles per bit is the count that is used as an example
// setting, and it is also the bit period the baud detector reports before it
// has measured a line. At a 50 MHz clock it is 9600 baud. The 50 MHz clock is
// this design's assumption, not something the design depends on.
package uart_pkg;

  localparam int unsigned DATA_BITS        = 8;     // data field of a frame
  localparam int unsigned FRAME_BITS       = 10;    // start + 8 data + stop
  localparam int unsigned BAUD_W           = 16;    // width of baud_rate[15:0]
  localparam int unsigned DEFAULT_BAUD_DIV = 5208;  // clocks per bit after reset

  // Sending module: state 0 idle, state 1 transmitting.
  typedef enum logic {
    TX_IDLE = 1'b0,
    TX_WORK = 1'b1
  } tx_state_e;

  // Receiving module.
  typedef enum logic [1:0] {
    RX_IDLE  = 2'd0,  // waiting for a falling edge
    RX_START = 2'd1,  // inside the start bit (validating or measuring it)
    RX_DATA  = 2'd2   // sampling data bits and the stop bit
  } rx_state_e;

  // Baud detector, shown as state[2:0]: 0 idle, 1 measuring the start bit.
  typedef enum logic [2:0] {
    BD_IDLE    = 3'd0,
    BD_MEASURE = 3'd1
  } bd_state_e;

endpackage
