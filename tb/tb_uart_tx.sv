// tb_uart_tx: self-checking test of the UART sending module.
//
// For several bit periods and random bytes, pulses start and then checks the
// serial output cycle by cycle against the expected frame: start bit 0 for
// exactly P cycles, data bits least significant first for P cycles each, stop
// bit 1, and done/busy exactly 10*P cycles after the start. While a frame is
// in flight it also pulses start with another byte and changes baud_div, both
// of which must be ignored (data cache and latched period). Frames are sent
// back to back, the next start in the cycle done is seen.
module tb_uart_tx;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [7:0]  data = '0;
  logic [15:0] baud_div = 16'd4;
  logic        rs232_tx, done, busy;
  int          checks = 0;
  int          failures = 0;

  uart_tx dut (
    .clk(clk), .rst_n(rst_n), .start(start), .data(data), .baud_div(baud_div),
    .rs232_tx(rs232_tx), .done(done), .busy(busy)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends one byte and checks the whole frame. Called just after a clock
  // edge; start is high at the next edge (edge c).
  task automatic send_and_check(input logic [7:0] b, input int p);
    logic exp;
    int   bit_i;
    baud_div = 16'(p);
    data     = b;
    start    = 1'b1;
    @(posedge clk);             // edge c
    #1 start = 1'b0;
    data     = ~b;
    for (int j = 0; j <= 10 * p; j++) begin
      if (j > 0) begin
        @(posedge clk);
        #1;
      end
      bit_i = j / p;
      if (bit_i == 0)      exp = 1'b0;
      else if (bit_i <= 8) exp = b[bit_i-1];
      else                 exp = 1'b1;
      check(rs232_tx == exp, $sformatf("tx bit %0d of 0x%02h, P=%0d", bit_i, b, p));
      check(busy == (j < 10 * p), "busy");
      check(done == (j == 10 * p), "done timing");
      // disturb the frame in flight: a second start and a new period
      if (j == 3 * p) begin
        start    = 1'b1;
        baud_div = 16'(p + 3);
      end else begin
        start    = 1'b0;
        baud_div = 16'(p);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(rs232_tx == 1'b1 && !busy && !done, "idle after reset");
    rst_n = 1'b1;
    @(posedge clk);
    #1 check(rs232_tx == 1'b1, "idle line high");
    foreach (int_periods[i]) begin
      for (int n = 0; n < 12; n++) send_and_check(8'($urandom), int_periods[i]);
    end
    send_and_check(8'h00, 5);
    send_and_check(8'hFF, 5);
    send_and_check(8'h55, 9);
    // idle line stays high with no start
    repeat (20) begin
      @(posedge clk);
      #1 check(rs232_tx == 1'b1 && !busy, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_periods[4] = '{1, 4, 7, 16};

endmodule
