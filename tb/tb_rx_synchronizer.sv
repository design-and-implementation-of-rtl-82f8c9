// tb_rx_synchronizer: self-checking test of the two-flop synchroniser.
//
// Drives a random level on d_async every clock cycle (changing it between
// clock edges) and checks that q_sync shows, after each rising edge, the
// value the input had STAGES edges earlier. Also checks the reset value (1,
// the idle line level) while and right after reset is applied.
module tb_rx_synchronizer;

  localparam int unsigned STAGES = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d_async = 1'b0;
  logic q_sync;
  int   checks = 0;
  int   failures = 0;
  logic hist [0:STAGES];

  rx_synchronizer dut (
    .clk(clk), .rst_n(rst_n), .d_async(d_async), .q_sync(q_sync)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(q_sync == 1'b1, "reset value");
    for (int i = 0; i <= STAGES; i++) hist[i] = 1'b1;
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      #2 d_async = 1'($urandom);
      @(posedge clk);
      // shift the model: hist[0] is the value taken at this edge
      for (int i = STAGES; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d_async;
      #1 check(q_sync == hist[STAGES-1], "delayed copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
