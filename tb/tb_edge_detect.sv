// tb_edge_detect: self-checking test of the falling/rising edge detector.
//
// Drives a random level on d after every rising clock edge and checks fall
// and rise against a model that remembers the level at the previous edge:
// fall when that level was 1 and d is 0, rise in the opposite case. Counts
// that both kinds of edge were seen.
module tb_edge_detect;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b1;
  logic fall, rise;
  logic prev;
  int   checks = 0;
  int   failures = 0;
  int   n_fall = 0, n_rise = 0;

  edge_detect dut (.clk(clk), .rst_n(rst_n), .d(d), .fall(fall), .rise(rise));

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
    repeat (2) @(posedge clk);
    #1 d = 1'b0;
    #1 check(fall == 1'b1 && rise == 1'b0, "fall after reset");
    d = 1'b1;
    rst_n = 1'b1;
    prev = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      prev = d;
      #1 d = 1'($urandom);
      #1;
      check(fall == (prev & ~d), "fall");
      check(rise == (~prev & d), "rise");
      if (fall) n_fall++;
      if (rise) n_rise++;
    end
    check(n_fall > 100 && n_rise > 100, "both edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
