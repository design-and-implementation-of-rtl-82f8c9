// tb_baud_detect: self-checking test of the adaptive baud-rate detector.
//
// The testbench drives the synchronised line and makes the fall/rise pulses
// from the previous line level. It checks the reset value 5208, that a low
// pulse of N cycles gives baud_rate = N with meas_done/meas_ok one cycle after
// the rise, state 1 while measuring and 0 otherwise, that a locked detector
// ignores later pulses, that rearm arms it again, that a falling edge while
// the receiver is busy is not measured, that a pulse shorter than MIN_BAUD is
// rejected without disarming, and that a line held low until the counter is
// full abandons the measurement.
module tb_baud_detect;

  import uart_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        line = 1'b1;
  logic        prev = 1'b1;
  logic        rx_fall, rx_rise;
  logic        rx_busy = 1'b0;
  logic        rearm = 1'b0;
  logic [15:0] baud_rate, baud_counter;
  bd_state_e   state;
  logic        armed, meas_done, meas_ok;
  int          checks = 0;
  int          failures = 0;
  int          n_done = 0;

  baud_detect dut (
    .clk(clk), .rst_n(rst_n), .rx_fall(rx_fall), .rx_rise(rx_rise),
    .rx_busy(rx_busy), .rearm(rearm), .baud_rate(baud_rate), .baud_counter(baud_counter),
    .state(state), .armed(armed), .meas_done(meas_done), .meas_ok(meas_ok)
  );

  always #5 clk = ~clk;
  always @(posedge clk) prev <= line;
  assign rx_fall = prev & ~line;
  assign rx_rise = ~prev & line;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Low pulse of n cycles; checks the detector cycle by cycle. expect_meas:
  // the detector should time it; expect_ok: and accept it.
  task automatic low_pulse(input int n, input bit expect_meas, input bit expect_ok);
    logic [15:0] rate_before;
    rate_before = baud_rate;
    @(posedge clk);
    #1 line = 1'b0;
    for (int j = 1; j <= n; j++) begin
      @(posedge clk);
      #1;
      check(!meas_done, "no report while low");
      check(state == (expect_meas ? BD_MEASURE : BD_IDLE), $sformatf("state while low (n=%0d)", n));
      if (expect_meas) check(baud_counter == 16'(j), "counter counts low cycles");
    end
    line = 1'b1;
    @(posedge clk);
    #1;
    check(meas_done == expect_meas, $sformatf("meas_done one cycle after rise (n=%0d)", n));
    check(meas_ok == (expect_meas && expect_ok), "meas_ok");
    check(state == BD_IDLE, "idle after rise");
    if (expect_meas && expect_ok) begin
      check(baud_rate == 16'(n), $sformatf("baud_rate %0d expected %0d", baud_rate, n));
      check(!armed, "locked after measurement");
      n_done++;
    end else begin
      check(baud_rate == rate_before, "baud_rate kept");
    end
    @(posedge clk);
    #1 check(!meas_done, "meas_done is a pulse");
    repeat (5) @(posedge clk);
  endtask

  task automatic do_rearm();
    @(posedge clk);
    #1 rearm = 1'b1;
    @(posedge clk);
    #1 rearm = 1'b0;
    check(armed, "armed after rearm");
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    #1 check(baud_rate == 16'd5208 && armed && state == BD_IDLE, "reset values");
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    low_pulse(9, 1'b1, 1'b1);               // first start bit after reset
    low_pulse(20, 1'b0, 1'b0);              // locked: ignored
    check(baud_rate == 16'd9, "rate held while locked");
    do_rearm();
    rx_busy = 1'b1;                     // receiver inside a frame: not a start bit
    low_pulse(7, 1'b0, 1'b0);
    rx_busy = 1'b0;
    check(armed, "still armed");
    low_pulse(2, 1'b1, 1'b0);               // noise: too short
    check(armed, "armed after rejected pulse");
    low_pulse(434, 1'b1, 1'b1);
    for (int k = 0; k < 8; k++) begin
      do_rearm();
      n = 4 + int'($urandom % 3000);
      low_pulse(n, 1'b1, 1'b1);
    end
    // line held low: give up at the counter's end
    do_rearm();
    @(posedge clk);
    #1 line = 1'b0;
    repeat (65535) @(posedge clk);
    #1 check(state == BD_MEASURE && !meas_done, "still measuring near the limit");
    @(posedge clk);
    #1 check(state == BD_IDLE && meas_done && !meas_ok, "break abandoned");
    check(armed, "armed after break");
    line = 1'b1;
    repeat (3) @(posedge clk);
    check(n_done == 10, "all measurements taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
