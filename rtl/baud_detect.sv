// baud_detect: adaptive baud-rate detection.
//
// The receiver learns the sender's bit period from the line itself, so that
// neither side has to be set to a baud rate in advance. The period is taken
// as the length of a start bit: from the falling edge that starts a frame to
// the next rising edge, counted in system clock cycles. That is one bit
// period whenever the first data bit (bit 0) is a 1, so the character used to
// set the rate must be odd; 0x55 is the usual choice.
//
// How it works. After reset the detector is armed and baud_rate holds
// DEFAULT_BAUD (5208). state is 0 (idle). When armed, a falling edge that
// the receiver takes as a start bit (rx_fall while rx_busy is low) moves
// state to 1 (measuring) and starts baud_counter at 1; it counts every cycle
// the line stays low. At the rising edge the count is the start bit length:
//  * a count of at least MIN_BAUD is taken: baud_rate gets the count, the
//    detector disarms (locked) and meas_done pulses with meas_ok = 1;
//  * a shorter pulse is noise: baud_rate is kept, meas_done pulses with
//    meas_ok = 0 and the detector stays armed;
//  * if baud_counter reaches its largest value the line is held low (a
//    break): the measurement is abandoned in the same way.
// state then returns to 0. baud_counter keeps its last value until the next
// measurement. A pulse on rearm (for instance when the receiver sees a
// framing error, which is what a change of the sender's rate produces)
// arms the detector again, so the next start bit sets a new rate. meas_done
// and the new baud_rate appear together, one cycle after the rising edge.
//
// Follows the reference design: baud_rate[15:0], baud_counter[15:0],
// state[2:0] with 0 idle and 1 detecting, the reset value 5208, measuring the
// start bit from its falling edge. This design's choices: the arming and
// rearm scheme, the MIN_BAUD noise limit and the break limit.
module baud_detect
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_WIDTH   = BAUD_W,
  parameter int unsigned DEFAULT_BAUD = DEFAULT_BAUD_DIV,
  parameter int unsigned MIN_BAUD     = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx_fall,       // falling edge of rx_sync
  input  logic                  rx_rise,       // rising edge of rx_sync
  input  logic                  rx_busy,       // receiver is inside a frame
  input  logic                  rearm,         // pulse: measure the next start bit
  output logic [BAUD_WIDTH-1:0] baud_rate,     // clock cycles per bit
  output logic [BAUD_WIDTH-1:0] baud_counter,  // running start bit count
  output bd_state_e             state,         // 0 idle, 1 measuring
  output logic                  armed,         // next start bit will be timed
  output logic                  meas_done,     // pulse: measurement ended
  output logic                  meas_ok        // with meas_done: baud_rate updated
);

  localparam logic [BAUD_WIDTH-1:0] CNT_MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= BD_IDLE;
      armed        <= 1'b1;
      baud_rate    <= BAUD_WIDTH'(DEFAULT_BAUD);
      baud_counter <= '0;
      meas_done    <= 1'b0;
      meas_ok      <= 1'b0;
    end else begin
      meas_done <= 1'b0;
      meas_ok   <= 1'b0;
      unique case (state)
        BD_IDLE: begin
          if (rearm) armed <= 1'b1;
          if (armed && rx_fall && !rx_busy) begin
            state        <= BD_MEASURE;
            baud_counter <= BAUD_WIDTH'(1);
          end
        end
        BD_MEASURE: begin
          if (rx_rise) begin
            state     <= BD_IDLE;
            meas_done <= 1'b1;
            if (baud_counter >= BAUD_WIDTH'(MIN_BAUD)) begin
              baud_rate <= baud_counter;
              armed     <= 1'b0;
              meas_ok   <= 1'b1;
            end
          end else if (baud_counter == CNT_MAX) begin
            state     <= BD_IDLE;          // line held low: give up
            meas_done <= 1'b1;
          end else begin
            baud_counter <= baud_counter + 1'b1;
          end
        end
        default: state <= BD_IDLE;
      endcase
    end
  end

  initial assert (MIN_BAUD >= 4) else $error("baud_detect: MIN_BAUD below 4 cannot be sampled at mid-bit");

  a_ok_with_done: assert property (@(posedge clk) disable iff (!rst_n) meas_ok |-> meas_done);

endmodule
