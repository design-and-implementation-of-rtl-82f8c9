// uart_top: full-duplex UART with adaptive baud-rate detection.
//
// One transmitter and one receiver work at the same time on separate lines
// (rs232_tx, rs232_rx) from one system clock and one active-low reset. The
// serial input passes a two-flop synchroniser (metastability removal) and an
// edge detector; the receiver and the baud detector both start from the
// falling edge of a start bit. The baud detector times the first start bit
// after reset (or after a re-arm) and its result, baud_rate, is the bit
// period of both the receiver and the transmitter, so the UART answers at
// the rate it was addressed with. Until a rate has been measured both sides
// use DEFAULT_BAUD clock cycles per bit (5208, 9600 baud at 50 MHz).
//
// Re-arming: a pulse on rearm, or a framing error seen by the receiver
// (a stop bit read as 0, what a change of the sender's rate tends to cause),
// arms the detector again, and the next start bit sets a new rate.
//
// Interface: tx_start/tx_data/tx_done/tx_busy is the parallel side of the
// transmitter (a start pulse while tx_busy is low sends tx_data);
// rx_data/rx_done/rx_frame_err is the parallel side of the receiver;
// baud_rate, baud_counter and baud_locked report the detector (locked = a measured rate is
// in use and the detector is not armed). The latency from the line to the
// receiver is SYNC_STAGES cycles plus the receiver's own timing.
//
// The split into sending module, receiving module, synchroniser and baud
// detection follows the reference design; the wiring of the detected rate to
// the transmitter, the arming scheme and the framing-error re-arm are this
// design's choices.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_WIDTH   = BAUD_W,
  parameter int unsigned DEFAULT_BAUD = DEFAULT_BAUD_DIV,
  parameter int unsigned MIN_BAUD     = 4,
  parameter int unsigned SYNC_STAGES  = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // serial lines
  input  logic                  rs232_rx,
  output logic                  rs232_tx,
  // transmitter, parallel side
  input  logic                  tx_start,
  input  logic [7:0]            tx_data,
  output logic                  tx_done,
  output logic                  tx_busy,
  // receiver, parallel side
  output logic [7:0]            rx_data,
  output logic                  rx_done,
  output logic                  rx_frame_err,
  // baud-rate detection
  input  logic                  rearm,
  output logic [BAUD_WIDTH-1:0] baud_rate,
  output logic [BAUD_WIDTH-1:0] baud_counter,
  output logic                  baud_locked
);

  logic                  rx_sync, rx_fall, rx_rise;
  logic                  rx_busy;
  bd_state_e             bd_state;
  logic                  armed, meas_done, meas_ok;
  logic                  measured;   // a rate has been measured since reset

  rx_synchronizer #(
    .STAGES    (SYNC_STAGES),
    .RESET_VAL (1'b1)
  ) u_sync (
    .clk     (clk),
    .rst_n   (rst_n),
    .d_async (rs232_rx),
    .q_sync  (rx_sync)
  );

  edge_detect u_edge (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (rx_sync),
    .fall  (rx_fall),
    .rise  (rx_rise)
  );

  baud_detect #(
    .BAUD_WIDTH   (BAUD_WIDTH),
    .DEFAULT_BAUD (DEFAULT_BAUD),
    .MIN_BAUD     (MIN_BAUD)
  ) u_baud (
    .clk          (clk),
    .rst_n        (rst_n),
    .rx_fall      (rx_fall),
    .rx_rise      (rx_rise),
    .rx_busy      (rx_busy),
    .rearm        (rearm | rx_frame_err),
    .baud_rate    (baud_rate),
    .baud_counter (baud_counter),
    .state        (bd_state),
    .armed        (armed),
    .meas_done    (meas_done),
    .meas_ok      (meas_ok)
  );

  uart_rx #(
    .BAUD_WIDTH (BAUD_WIDTH)
  ) u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_sync    (rx_sync),
    .rx_fall    (rx_fall),
    .baud_div   (baud_rate),
    .meas_armed (armed),
    .meas_done  (meas_done),
    .meas_ok    (meas_ok),
    .rx_data    (rx_data),
    .done       (rx_done),
    .frame_err  (rx_frame_err),
    .busy       (rx_busy)
  );

  uart_tx #(
    .BAUD_WIDTH (BAUD_WIDTH)
  ) u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (tx_start),
    .data     (tx_data),
    .baud_div (baud_rate),
    .rs232_tx (rs232_tx),
    .done     (tx_done),
    .busy     (tx_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  measured <= 1'b0;
    else if (meas_done && meas_ok) measured <= 1'b1;
  end

  assign baud_locked = measured && !armed;

  // The detector only starts timing on a falling edge the receiver also takes.
  a_measure_in_start: assert property (@(posedge clk) disable iff (!rst_n)
    (bd_state == BD_MEASURE) |-> rx_busy);

endmodule
