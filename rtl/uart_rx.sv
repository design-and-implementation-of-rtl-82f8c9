// uart_rx: UART receiving module.
//
// Rebuilds a byte from one serial frame (start bit, eight data bits least
// significant bit first, stop bit) on the synchronised line rx_sync, and
// pulses done with the byte on rx_data when the stop bit is a 1.
//
// How it works. In idle the module waits for a falling edge (rx_fall from
// the edge detector). Then there are two ways through the start bit:
//  * Normal: the bit period is already known. baud_cnt counts to half a bit
//    period (HALF_BAUD_TICK, the period shifted right by one). If the line is
//    still low there, the start bit is taken as real; if it is back high it
//    was a noise glitch and the module returns to idle. From that mid-bit
//    point every full period ends one bit, bit_flag pulses and the line is
//    sampled, so every data bit is sampled at its middle.
//  * Measuring: the baud detector is armed (meas_armed) and is timing this
//    start bit. The module waits until the detector reports (meas_done). If
//    the measurement was rejected (meas_ok low) it returns to idle. Otherwise
//    the start bit has just ended, the new period is on baud_div, and the
//    counter is preloaded so that the first sample falls half a period later,
//    at the middle of data bit 0. The frame whose start bit set the rate is
//    therefore received at that rate.
// bit_cnt counts the samples, 0..7 for the data bits and 8 for the stop bit.
// Data bits enter shift_reg from the top, so after eight samples the first
// bit is bit 0. At the stop sample a 1 copies shift_reg to rx_data and pulses
// done; a 0 pulses frame_err and leaves rx_data alone. The module is then
// idle again, half a bit period before the frame ends, which leaves time to
// see the next start bit.
//
// Timing, normal path: with the falling edge seen at cycle 0 and period T,
// data bit k is sampled at cycle T/2 + (k+1)*T and done is 1 one cycle after
// the stop sample at T/2 + 9*T. The bit period is latched when a frame starts
// (or when its measurement ends), so a changing baud_div cannot upset a frame.
//
// Follows the reference design: frame format, falling-edge start detection,
// mid-bit sampling from a half-period count, done only after a good stop bit,
// the signal names. This design's choices: the noise check at mid start bit,
// frame_err, the measuring path, and taking the period as an input.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_WIDTH = BAUD_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx_sync,     // synchronised serial input
  input  logic                  rx_fall,     // falling edge of rx_sync
  input  logic [BAUD_WIDTH-1:0] baud_div,    // clock cycles per bit
  input  logic                  meas_armed,  // detector will time this start bit
  input  logic                  meas_done,   // detector finished timing
  input  logic                  meas_ok,     // ... and accepted the result
  output logic [7:0]            rx_data,     // received byte
  output logic                  done,        // one-cycle pulse: rx_data valid
  output logic                  frame_err,   // one-cycle pulse: stop bit was 0
  output logic                  busy         // a frame is being received
);

  rx_state_e             state;
  logic                  measuring;   // this frame's start bit is being timed
  logic [BAUD_WIDTH-1:0] period;
  logic [BAUD_WIDTH-1:0] half_period; // HALF_BAUD_TICK
  logic [BAUD_WIDTH-1:0] baud_cnt;
  logic [3:0]            bit_cnt;
  logic                  bit_flag;
  logic [7:0]            shift_reg;
  logic [BAUD_WIDTH-1:0] new_period;

  assign half_period = period >> 1;
  assign bit_flag    = (state == RX_DATA) && (baud_cnt >= period);
  assign busy        = (state != RX_IDLE);
  assign new_period  = (baud_div < BAUD_WIDTH'(2)) ? BAUD_WIDTH'(2) : baud_div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RX_IDLE;
      measuring <= 1'b0;
      period    <= BAUD_WIDTH'(2);
      baud_cnt  <= '0;
      bit_cnt   <= '0;
      shift_reg <= '0;
      rx_data   <= '0;
      done      <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      done      <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          bit_cnt <= '0;
          if (rx_fall) begin
            state     <= RX_START;
            measuring <= meas_armed;
            period    <= new_period;
            baud_cnt  <= BAUD_WIDTH'(1);
          end
        end
        RX_START: begin
          if (measuring) begin
            if (meas_done) begin
              if (meas_ok) begin
                // start bit just ended: first sample half a period from now
                state    <= RX_DATA;
                period   <= new_period;
                baud_cnt <= new_period - (new_period >> 1) + BAUD_WIDTH'(2);
              end else begin
                state <= RX_IDLE;
              end
            end
          end else if (baud_cnt >= half_period) begin
            if (!rx_sync) begin
              state    <= RX_DATA;             // valid start bit
              baud_cnt <= BAUD_WIDTH'(1);
            end else begin
              state    <= RX_IDLE;             // glitch: line went high again
            end
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (bit_flag) begin
            baud_cnt <= BAUD_WIDTH'(1);
            if (bit_cnt == 4'(DATA_BITS)) begin
              state   <= RX_IDLE;
              bit_cnt <= '0;
              if (rx_sync) begin
                rx_data <= shift_reg;
                done    <= 1'b1;
              end else begin
                frame_err <= 1'b1;
              end
            end else begin
              shift_reg <= {rx_sync, shift_reg[7:1]};
              bit_cnt   <= bit_cnt + 1'b1;
            end
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  a_done_not_err: assert property (@(posedge clk) disable iff (!rst_n) !(done && frame_err));

endmodule
