// uart_core_tb: self-checking test of the UART transmitter and receiver.
//
// With a short bit time (CLKS_PER_BIT = 12) the test
//   - sends random bytes with a one-cycle tx_dv and decodes the serial line
//     itself, mid-bit: start bit 0, eight data bits LSB first, stop bit 1;
//   - checks that tx_done pulses exactly 10 bit times after tx_dv, once per
//     byte, and that tx_active covers the frame;
//   - loops the line back into the receiver and checks every byte it
//     reports, and that a frame with a broken stop bit is discarded.
module uart_core_tb;
  import fsi_daq_pkg::*;

  localparam int unsigned CPB = 12;

  logic        clk = 1'b0;
  logic        rst;
  logic        tx_dv;
  byte_t       tx_byte;
  logic        tx_serial, tx_active, tx_done;
  logic        rx_serial, rx_dv;
  byte_t       rx_byte;
  logic        loopback, tb_line;
  int unsigned checks = 0, failures = 0;

  uart_core #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .tx_dv, .tx_byte, .tx_serial, .tx_active, .tx_done,
    .rx_serial, .rx_dv, .rx_byte);

  assign rx_serial = loopback ? tx_serial : tb_line;

  always #5 clk = ~clk;

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte_t rx_q [$];
  always @(posedge clk) if (!rst && rx_dv) rx_q.push_back(rx_byte);

  int unsigned done_pulses = 0;
  always @(posedge clk) if (!rst && tx_done) done_pulses++;

  task automatic send_and_check(byte_t b);
    byte_t got;
    int    cyc;
    @(negedge clk);
    tx_byte = b;
    tx_dv   = 1'b1;
    @(negedge clk);
    tx_dv   = 1'b0;
    tx_byte = ~b;                 // the byte must have been latched
    // The start bit began at the edge that took tx_dv; move to its middle.
    repeat (CPB / 2 - 1) @(negedge clk);
    expect_true("start bit is 0", tx_serial == 1'b0);
    expect_true("tx_active during frame", tx_active);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      got[i] = tx_serial;
    end
    repeat (CPB) @(negedge clk);
    expect_true("stop bit is 1", tx_serial == 1'b1);
    checks++;
    if (got !== b) begin
      failures++;
      $display("FAIL line decode: got %h expected %h", got, b);
    end
    // tx_done rises exactly 10 bit times after the edge that took tx_dv;
    // cyc counts falling edges since that edge.
    cyc = CPB / 2 + 9 * CPB;
    while (!tx_done && cyc < 12 * CPB) begin
      @(negedge clk);
      cyc++;
    end
    expect_true("tx_done after ten bit times", tx_done && cyc == 10 * CPB + 1);
    @(negedge clk);
    expect_true("tx_done is one cycle", !tx_done);
    expect_true("idle after frame", !tx_active && tx_serial);
  endtask

  task automatic drive_frame(byte_t b, logic stop);
    tb_line = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      tb_line = b[i];
      repeat (CPB) @(negedge clk);
    end
    tb_line = stop;
    repeat (CPB) @(negedge clk);
    tb_line = 1'b1;
    repeat (2 * CPB) @(negedge clk);
  endtask

  byte_t sent [$];

  initial begin
    rst = 1'b1;
    tx_dv = 1'b0;
    tx_byte = '0;
    loopback = 1'b1;
    tb_line = 1'b1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    expect_true("line idles high", tx_serial == 1'b1 && !tx_active);
    for (int i = 0; i < 60; i++) begin
      byte_t b;
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : byte_t'($urandom);
      sent.push_back(b);
      send_and_check(b);
    end
    repeat (3 * CPB) @(negedge clk);
    expect_true("one tx_done per byte", done_pulses == 60);
    expect_true("receiver got every byte", rx_q.size() == 60);
    for (int i = 0; i < 60 && i < rx_q.size(); i++) begin
      checks++;
      if (rx_q[i] !== sent[i]) begin
        failures++;
        $display("FAIL loopback byte %0d: got %h expected %h", i, rx_q[i], sent[i]);
      end
    end
    // Frames from the test itself, one with a bad stop bit.
    rx_q.delete();
    loopback = 1'b0;
    drive_frame(8'hA5, 1'b1);
    drive_frame(8'h3C, 1'b0);
    drive_frame(8'h81, 1'b1);
    expect_true("bad stop bit frame discarded", rx_q.size() == 2);
    if (rx_q.size() == 2)
      expect_true("received bytes", rx_q[0] == 8'hA5 && rx_q[1] == 8'h81);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
