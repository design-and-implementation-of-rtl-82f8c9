// tb_uart_rx: self-checking test of the UART receiving module.
//
// The testbench plays the sender on the synchronised line and makes the
// falling-edge pulse itself from the previous line level. It checks:
//  * normal frames at several bit periods with random bytes: the byte, and
//    that done comes exactly HALF + 9*P + 1 cycles after the line fell
//    (HALF = P/2), i.e. one cycle after the middle of the stop bit;
//  * a sender 3 % slower than the receiver's setting is still received;
//  * a short low glitch is rejected: no done, no frame error;
//  * a frame whose stop bit is 0 gives frame_err and no done;
//  * the measuring path: with meas_armed set, the receiver waits for the
//    detector's report, which the testbench gives one cycle after the start
//    bit ends together with the measured period on baud_div, and the frame
//    is received at that period; a rejected measurement sends it back to
//    idle.
module tb_uart_rx;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        line = 1'b1;
  logic        prev = 1'b1;
  logic        rx_fall;
  logic [15:0] baud_div = 16'd8;
  logic        meas_armed = 1'b0, meas_done = 1'b0, meas_ok = 1'b0;
  logic [7:0]  rx_data;
  logic        done, frame_err, busy;
  int          checks = 0;
  int          failures = 0;
  int          cyc = 0;
  int          done_cnt = 0, err_cnt = 0, done_cyc = 0;
  logic [7:0]  got = '0;

  uart_rx dut (
    .clk(clk), .rst_n(rst_n), .rx_sync(line), .rx_fall(rx_fall), .baud_div(baud_div),
    .meas_armed(meas_armed), .meas_done(meas_done), .meas_ok(meas_ok),
    .rx_data(rx_data), .done(done), .frame_err(frame_err), .busy(busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    prev <= line;
  end
  assign rx_fall = prev & ~line;

  always @(posedge clk) begin
    #1;
    if (done) begin
      done_cnt++;
      done_cyc = cyc;
      got      = rx_data;
    end
    if (frame_err) err_cnt++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drives one frame with bit period p (cycles). frame = {stop, data, start}.
  // If meas, plays the detector: report period p one cycle after the start bit.
  // Returns the cycle count of the edge after which the line fell.
  task automatic drive_frame(input logic [9:0] frame, input int p, input bit meas,
                             input bit meas_good, output int c0);
    @(posedge clk);
    #1 line = frame[0];
    c0 = cyc;
    for (int j = 1; j < 10 * p; j++) begin
      @(posedge clk);
      #1;
      if (j % p == 0) line = frame[j / p];
      if (meas && j == p + 1) begin
        meas_done = 1'b1;
        meas_ok   = meas_good;
        baud_div  = 16'(p);
      end else begin
        meas_done = 1'b0;
        meas_ok   = 1'b0;
      end
    end
    @(posedge clk);
    #1 line = 1'b1;
  endtask

  task automatic rx_frame(input logic [7:0] b, input int p, input int p_send,
                          input bit meas, input bit timing);
    int c0, n0, e0, half;
    n0 = done_cnt;
    e0 = err_cnt;
    half = p / 2;
    drive_frame({1'b1, b, 1'b0}, p_send, meas, 1'b1, c0);
    repeat (p) @(posedge clk);
    #2;
    check(done_cnt == n0 + 1 && err_cnt == e0, $sformatf("one done for 0x%02h P=%0d", b, p));
    check(got == b, $sformatf("data 0x%02h got 0x%02h P=%0d", b, got, p));
    if (timing) check(done_cyc == c0 + half + 9 * p + 1,
                      $sformatf("done at %0d expected %0d", done_cyc - c0, half + 9 * p + 1));
    check(!busy, "idle after frame");
  endtask

  int periods[5] = '{4, 5, 8, 13, 32};

  initial begin
    int c0, n0, e0;
    logic [7:0] keep;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    // normal path, exact rate
    foreach (periods[i]) begin
      baud_div = 16'(periods[i]);
      for (int n = 0; n < 10; n++) rx_frame(8'($urandom), periods[i], periods[i], 1'b0, 1'b1);
      rx_frame(8'h00, periods[i], periods[i], 1'b0, 1'b1);
      rx_frame(8'hFF, periods[i], periods[i], 1'b0, 1'b1);
    end
    // sender 3 % slow
    baud_div = 16'd100;
    for (int n = 0; n < 5; n++) rx_frame(8'($urandom), 100, 103, 1'b0, 1'b0);
    // glitch shorter than half a bit
    baud_div = 16'd20;
    n0 = done_cnt;
    e0 = err_cnt;
    @(posedge clk);
    #1 line = 1'b0;
    repeat (3) @(posedge clk);
    #1 line = 1'b1;
    repeat (400) @(posedge clk);
    #2 check(done_cnt == n0 && err_cnt == e0 && !busy, "glitch rejected");
    // stop bit 0
    keep = got;
    drive_frame({1'b0, 8'hA5, 1'b0}, 20, 1'b0, 1'b0, c0);
    repeat (40) @(posedge clk);
    #2 check(err_cnt == e0 + 1 && done_cnt == n0, "frame error flagged");
    check(rx_data == keep, "rx_data kept on frame error");
    // measuring path: period comes from the (emulated) detector
    meas_armed = 1'b1;
    baud_div   = 16'd5208;
    foreach (periods[i]) begin
      rx_frame(8'h55, periods[i], periods[i], 1'b1, 1'b1);
      baud_div = 16'd5208;
      rx_frame(8'hC3, periods[i] + 1, periods[i] + 1, 1'b1, 1'b1);
      baud_div = 16'd5208;
    end
    // rejected measurement: back to idle, frame ignored
    n0 = done_cnt;
    e0 = err_cnt;
    drive_frame({1'b1, 8'hFF, 1'b0}, 6, 1'b1, 1'b0, c0);
    repeat (20) @(posedge clk);
    #2 check(done_cnt == n0 && err_cnt == e0 && !busy, "rejected measurement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
