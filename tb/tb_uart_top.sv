// tb_uart_top: end-to-end test of the adaptive-baud UART at its default
// parameters (5208 clock cycles per bit until a rate is measured).
//
// The testbench is the far end of both serial lines: it sends frames on
// rs232_rx at a bit period of its choosing, and decodes rs232_tx with the bit
// period it expects the UART to answer at. A clock of 20 ns (50 MHz) makes
// 434, 868 and 5208 cycles per bit the rates 115200, 57600 and 9600 baud.
// Sequence:
//  A  after reset the rate is 5208 and not locked; a sync byte 0x55 at 434
//     cycles per bit sets baud_rate to 434 and is itself received;
//  B  full duplex at 434: the UART sends bytes while it receives others;
//     the transmitted frames must have exactly baud_rate cycles per bit;
//  C  a 2-cycle glitch on the locked line is ignored;
//  D  rearm, a glitch while armed (rejected measurement), sync at 868, data;
//  E  the far end changes to 5208: its first frame (0x00) gives a framing
//     error, which re-arms the detector; a sync at 5208 sets the rate, then
//     data both ways at 5208.
// Every received byte is compared with what was sent, in order. Each
// mechanism is counted (rate measured, frame received on the measured rate,
// duplex overlap, glitch ignored, measurement rejected, rearm by port,
// rearm by framing error) and one that never happened is a failure.
module tb_uart_top;

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
  int          far_period = 5208;      // period the far end decodes rs232_tx at
  logic [7:0]  rx_expect[$];
  logic [7:0]  tx_expect[$];
  int          n_rx = 0, n_tx = 0, n_err = 0;

  // mechanism counters
  int n_measured = 0, n_meas_frame = 0, n_overlap = 0, n_glitch = 0;
  int n_meas_reject = 0, n_rearm_port = 0, n_rearm_ferr = 0;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive side monitor
  always @(posedge clk) begin
    #1;
    cyc++;
    if (rx_done) begin
      n_rx++;
      if (rx_expect.size() == 0) check(1'b0, $sformatf("unexpected byte 0x%02h", rx_data));
      else begin
        logic [7:0] e;
        e = rx_expect.pop_front();
        check(rx_data == e, $sformatf("rx byte 0x%02h expected 0x%02h", rx_data, e));
      end
    end
    if (rx_frame_err) n_err++;
    if (dut.u_rx.busy && tx_busy) n_overlap++;
    if (dut.u_baud.meas_done && dut.u_baud.meas_ok) n_measured++;
    if (dut.u_baud.meas_done && !dut.u_baud.meas_ok) n_meas_reject++;
  end

  // far-end receiver: decodes rs232_tx at far_period, checks the exact frame length
  initial begin : far_rx
    int c, p;
    logic [7:0] b;
    forever begin
      @(posedge clk);
      #2;
      if (!rs232_tx) begin
        c = cyc;
        p = far_period;
        repeat (p / 2) @(posedge clk);
        #2 check(!rs232_tx, "tx start bit");
        for (int k = 0; k < 8; k++) begin
          repeat (p) @(posedge clk);
          #2 b[k] = rs232_tx;
        end
        repeat (p) @(posedge clk);
        #2 check(rs232_tx, "tx stop bit");
        while (cyc < c + 10 * p) begin
          @(posedge clk);
          #2;
        end
        check(tx_done, $sformatf("tx_done exactly 10 bit periods (%0d cycles) after start", 10 * p));
        n_tx++;
        if (tx_expect.size() == 0) check(1'b0, "unexpected tx frame");
        else begin
          logic [7:0] e;
          e = tx_expect.pop_front();
          check(b == e, $sformatf("tx byte 0x%02h expected 0x%02h", b, e));
        end
      end
    end
  end

  // far-end sender: one frame on rs232_rx; stop_bit 0 makes a bad frame
  task automatic far_send(input logic [7:0] b, input int p, input bit stop_bit = 1'b1);
    logic [9:0] f;
    f = {stop_bit, b, 1'b0};
    for (int m = 0; m < 10; m++) begin
      @(posedge clk);
      #1 rs232_rx = f[m];
      repeat (p - 1) @(posedge clk);
    end
    @(posedge clk);
    #1 rs232_rx = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic glitch();
    @(posedge clk);
    #1 rs232_rx = 1'b0;
    repeat (2) @(posedge clk);
    #1 rs232_rx = 1'b1;
    idle(50);
  endtask

  // UART sends n random bytes, one after the other
  task automatic local_send(input int n);
    for (int i = 0; i < n; i++) begin
      while (tx_busy) @(posedge clk);
      #1 tx_data = 8'($urandom);
      tx_expect.push_back(tx_data);
      tx_start = 1'b1;
      @(posedge clk);
      #1 tx_start = 1'b0;
      @(posedge clk);
    end
  endtask

  task automatic far_data(input int p, input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      rx_expect.push_back(b);
      far_send(b, p);
      idle(p / 3);
    end
  endtask

  task automatic sync_and_data(input int p, input int n);
    int m0;
    m0 = n_measured;
    rx_expect.push_back(8'h55);
    far_send(8'h55, p);
    idle(2 * p);
    check(n_measured == m0 + 1, "sync measured");
    check(baud_rate == 16'(p), $sformatf("baud_rate %0d expected %0d", baud_rate, p));
    check(baud_locked, "locked");
    if (rx_expect.size() == 0) n_meas_frame++;
    far_data(p, n);
  endtask

  initial begin
    int e0, r0;
    repeat (5) @(posedge clk);
    #1 check(baud_rate == 16'd5208 && !baud_locked, "reset rate 5208, unlocked");
    rst_n = 1'b1;
    idle(20);

    // A + B: sync at 434, then full duplex
    sync_and_data(434, 0);
    far_period = 434;
    fork
      far_data(434, 6);
      local_send(6);
    join
    idle(2000);

    // C: glitch on the locked line
    r0 = n_rx;
    e0 = n_err;
    glitch();
    idle(2000);
    check(n_rx == r0 && n_err == e0 && baud_rate == 16'd434, "glitch ignored");
    if (n_rx == r0 && n_err == e0) n_glitch++;

    // D: rearm by port, rejected measurement, new rate 868
    @(posedge clk);
    #1 rearm = 1'b1;
    @(posedge clk);
    #1 rearm = 1'b0;
    check(!baud_locked, "unlocked after rearm");
    if (!baud_locked) n_rearm_port++;
    r0 = n_meas_reject;
    glitch();
    check(n_meas_reject == r0 + 1 && !baud_locked && baud_rate == 16'd434, "noise does not set the rate");
    sync_and_data(868, 3);
    far_period = 868;
    local_send(2);
    idle(25 * 868);

    // E: far end moves to 5208 cycles per bit without warning
    e0 = n_err;
    far_send(8'h00, 5208);
    idle(1000);
    check(n_err == e0 + 1, "framing error on rate change");
    check(!baud_locked, "re-armed by framing error");
    if (n_err == e0 + 1 && !baud_locked) n_rearm_ferr++;
    idle(5208);
    far_period = 5208;
    fork
      sync_and_data(5208, 1);
      begin
        idle(3 * 5208);
        local_send(1);
      end
    join
    idle(12 * 5208);

    check(rx_expect.size() == 0, "all sent bytes received");
    check(tx_expect.size() == 0, "all transmitted bytes decoded");
    check(n_measured == 3, $sformatf("three rates measured, got %0d", n_measured));
    check(n_meas_frame > 0, "frame received at the rate measured from its own start bit");
    check(n_overlap > 0, "transmit and receive overlapped");
    check(n_glitch > 0, "glitch ignored");
    check(n_meas_reject > 0, "measurement rejected");
    check(n_rearm_port > 0, "rearm by port");
    check(n_rearm_ferr > 0, "rearm by framing error");
    $display("mechanisms: measured=%0d measured_frame=%0d overlap_cycles=%0d glitch=%0d meas_reject=%0d rearm_port=%0d rearm_ferr=%0d rx=%0d tx=%0d",
             n_measured, n_meas_frame, n_overlap, n_glitch, n_meas_reject, n_rearm_port, n_rearm_ferr, n_rx, n_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
