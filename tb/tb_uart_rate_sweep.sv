// tb_uart_rate_sweep: the UART retrained to many bit periods in turn.
//
// For each period P in a list (9 cycles per bit, as short as a simulation of
// the published design used, up to the default 5208) the testbench pulses
// rearm, sends the sync character 0x55 at P cycles per bit and checks that
// baud_rate becomes exactly P and that 0x55 is received. Then one random byte
// goes each way at the same time: the testbench sends one to the UART, and
// the UART sends one that the testbench decodes at P, including a check that
// tx_done comes exactly 10*P cycles after the start bit began.
module tb_uart_rate_sweep;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        rs232_rx = 1'b1;
  logic        rs232_tx;
  logic        tx_start = 1'b0;
  logic [7:0]  tx_data = '0;
  logic        tx_done, tx_busy;
  logic [7:0]  rx_data;
  logic        rx_done, rx_frame_err;
  logic        rearm = 1'b0;
  logic [15:0] baud_rate, baud_counter;
  logic        baud_locked;

  int          checks = 0;
  int          failures = 0;
  int          cyc = 0;
  logic [7:0]  rx_expect[$];
  int          n_rx = 0;

  int periods[10] = '{9, 16, 37, 100, 434, 868, 1302, 2604, 5208, 12};

  uart_top dut (
    .clk(clk), .rst_n(rst_n), .rs232_rx(rs232_rx), .rs232_tx(rs232_tx),
    .tx_start(tx_start), .tx_data(tx_data), .tx_done(tx_done), .tx_busy(tx_busy),
    .rx_data(rx_data), .rx_done(rx_done), .rx_frame_err(rx_frame_err),
    .rearm(rearm), .baud_rate(baud_rate), .baud_counter(baud_counter),
    .baud_locked(baud_locked)
  );

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    check(!rx_frame_err, "no framing error");
    if (rx_done) begin
      n_rx++;
      if (rx_expect.size() == 0) check(1'b0, "unexpected byte");
      else begin
        logic [7:0] e;
        e = rx_expect.pop_front();
        check(rx_data == e, $sformatf("rx 0x%02h expected 0x%02h", rx_data, e));
      end
    end
  end

  task automatic far_send(input logic [7:0] b, input int p);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    rx_expect.push_back(b);
    for (int m = 0; m < 10; m++) begin
      @(posedge clk);
      #1 rs232_rx = f[m];
      repeat (p - 1) @(posedge clk);
    end
    @(posedge clk);
    #1 rs232_rx = 1'b1;
  endtask

  // UART sends b; the testbench decodes it at period p
  task automatic local_send_and_decode(input logic [7:0] b, input int p);
    logic [7:0] got;
    @(posedge clk);
    #1 tx_data = b;
    tx_start = 1'b1;
    @(posedge clk);
    #1 tx_start = 1'b0;
    // the start bit began at the edge just passed (edge c)
    check(!rs232_tx, "start bit");
    repeat (p / 2) @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      repeat (p) @(posedge clk);
      #1 got[k] = rs232_tx;
    end
    repeat (p) @(posedge clk);
    #1 check(rs232_tx, "stop bit");
    repeat (p - p / 2) @(posedge clk);    // now at edge c + 10*p
    #2 check(tx_done, $sformatf("tx_done after 10 periods, P=%0d", p));
    check(got == b, $sformatf("tx 0x%02h decoded as 0x%02h, P=%0d", b, got, p));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    foreach (periods[i]) begin
      int p;
      p = periods[i];
      @(posedge clk);
      #1 rearm = 1'b1;
      @(posedge clk);
      #1 rearm = 1'b0;
      far_send(8'h55, p);
      repeat (p) @(posedge clk);
      #2 check(baud_rate == 16'(p), $sformatf("baud_rate %0d expected %0d", baud_rate, p));
      check(baud_locked, "locked");
      fork
        far_send(8'($urandom), p);
        local_send_and_decode(8'($urandom), p);
      join
      repeat (2 * p) @(posedge clk);
      #2 check(rx_expect.size() == 0, $sformatf("both bytes received at P=%0d", p));
    end
    check(n_rx == 2 * $size(periods), "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
