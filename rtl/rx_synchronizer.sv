// rx_synchronizer: removes metastability from the asynchronous serial input.
//
// The serial line is not related to the system clock, so the first flip-flop
// that samples it may go metastable. A chain of STAGES flip-flops (two, as in
// the reference design) gives the first stage a full clock period to settle
// before the second stage passes a definite level to the rest of the
// receiver. The output follows the input STAGES clock cycles later.
//
// Interface: clk, rst_n (asynchronous, active low), d_async in, q_sync out.
// Reset loads RESET_VAL into every stage; it defaults to 1, the idle level of
// a UART line, so that leaving reset never looks like a start bit. The reset
// value is this design's choice.
module rx_synchronizer #(
  parameter int unsigned STAGES    = 2,
  parameter bit          RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d_async,
  output logic q_sync
);

  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= {STAGES{RESET_VAL}};
    else        sync_q <= {sync_q[STAGES-2:0], d_async};
  end

  assign q_sync = sync_q[STAGES-1];

  initial assert (STAGES >= 2) else $error("rx_synchronizer needs at least two stages");

endmodule
