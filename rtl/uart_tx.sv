// uart_tx: UART sending module.
//
// Turns a byte into one serial frame on rs232_tx: a start bit (0), the eight
// data bits least significant bit first, and a stop bit (1). The line idles
// at 1.
//
// How it works. A one-cycle pulse on start while the module is idle copies
// data into a cache register (r_data) and the bit period into its own
// register, so that neither a new byte nor a new baud setting can disturb a
// frame in flight. state then goes from 0 (idle) to 1 (working). baud_cnt
// counts the clock cycles of the current bit from 0 to period-1; bit_flag is
// 1 in the cycle it reaches period-1, which ends the bit. bit_cnt counts the
// bits sent in the frame, 0 for the start bit up to 9 for the stop bit; the
// flag that ends bit 9 makes the count reach ten bits, and done pulses for
// one cycle as state returns to 0. The serial output is a flip-flop, so the
// line has no glitches.
//
// Timing. If start is high at clock edge c, the start bit is on the line from
// edge c on for exactly baud_div cycles, each later bit also lasts baud_div
// cycles, and done (with busy low) follows edge c + 10*baud_div; a start at
// that next edge is accepted, so frames can follow back to back with no idle
// time. start is ignored while busy. A baud_div of 0 is treated as 1.
//
// The frame, the state encoding, the signal names and the counter scheme
// follow the reference design. The start/data handshake (a pulse, ignored
// while busy) and taking the bit period as an input rather than a constant,
// so that the detected baud rate can drive it, are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned BAUD_WIDTH = BAUD_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,     // pulse: send data
  input  logic [7:0]            data,      // byte to send
  input  logic [BAUD_WIDTH-1:0] baud_div,  // clock cycles per bit
  output logic                  rs232_tx,  // serial output
  output logic                  done,      // one-cycle pulse: frame sent
  output logic                  busy       // state: 1 while a frame is sent
);

  tx_state_e             state;
  logic [7:0]            r_data;    // data cache
  logic [BAUD_WIDTH-1:0] period;    // bit period latched at start
  logic [BAUD_WIDTH-1:0] baud_cnt;
  logic [3:0]            bit_cnt;
  logic                  bit_flag;

  assign bit_flag = (state == TX_WORK) && (baud_cnt == period - 1'b1);
  assign busy     = (state == TX_WORK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      r_data   <= '0;
      period   <= BAUD_WIDTH'(1);
      baud_cnt <= '0;
      bit_cnt  <= '0;
      done     <= 1'b0;
      rs232_tx <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        TX_IDLE: begin
          rs232_tx <= 1'b1;
          if (start) begin
            state    <= TX_WORK;
            r_data   <= data;
            period   <= (baud_div == '0) ? BAUD_WIDTH'(1) : baud_div;
            baud_cnt <= '0;
            bit_cnt  <= '0;
            rs232_tx <= 1'b0;            // start bit
          end
        end
        TX_WORK: begin
          if (bit_flag) begin
            baud_cnt <= '0;
            if (bit_cnt == 4'(FRAME_BITS - 1)) begin
              // stop bit finished: ten bits sent
              bit_cnt  <= '0;
              state    <= TX_IDLE;
              done     <= 1'b1;
              rs232_tx <= 1'b1;
            end else begin
              bit_cnt  <= bit_cnt + 1'b1;
              // next bit: data bits 1..8, then the stop bit
              rs232_tx <= (bit_cnt == 4'(DATA_BITS)) ? 1'b1 : r_data[bit_cnt[2:0]];
            end
          end else begin
            baud_cnt <= baud_cnt + 1'b1;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // The line is idle high whenever no frame is being sent.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == TX_IDLE) |-> rs232_tx);

endmodule
