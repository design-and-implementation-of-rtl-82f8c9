// edge_detect: falling and rising edge detection on the synchronised line.
//
// A start bit is announced by the line going from 1 to 0. The receiver and
// the baud detector act on that transition, not on the level, so that a line
// that stays low is not taken for a stream of start bits. The block keeps
// the previous value of the synchronised input in one flip-flop and compares:
// fall is 1 in the first cycle the input is 0 after a 1, rise in the first
// cycle it is 1 after a 0. Both are single-cycle pulses, combinational from
// the input and the stored value, with no added latency.
//
// Interface: clk, rst_n (asynchronous, active low), d (already synchronised),
// fall, rise. The stored value resets to 1 (idle line), this design's choice.
module edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic fall,
  output logic rise
);

  logic d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= 1'b1;
    else        d_q <= d;
  end

  assign fall =  d_q & ~d;
  assign rise = ~d_q &  d;

endmodule
