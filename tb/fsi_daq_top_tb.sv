// fsi_daq_top_tb: end-to-end test of the DAQ core with a small FIFO and a
// fast UART so that every mechanism of the design is reached quickly.
//
// An ADC output model sends numbered samples on the DDR lanes; a UART
// monitor decodes the serial line back into bytes, and pairs of bytes (high
// byte first) back into samples. A sequence of laser sweeps is played on the
// trigger:
//   - the ADC-ready signal is held low at first: the controller must wait;
//   - sweep A is ended by the trigger's rising edge;
//   - sweep B is longer than the FIFO: acquisition is ended by FIFO full and
//     exactly FIFO_DEPTH*4 samples come back;
//   - sweep C is too short to fill one 64-bit word: the controller gives up
//     waiting for data and returns to idle;
//   - sweep D starts while sweep B's data is still being sent and must be
//     ignored; sweep E after it is captured;
//   - a byte sent into the receiver is reported.
// For each captured sweep the received samples must be consecutive ADC
// samples, start no earlier than the falling trigger edge, end no later than
// a fixed latency after the rising edge, and be a multiple of four. The test
// counts how often each mechanism happened and fails if one never did.
module fsi_daq_top_tb;
  import fsi_daq_pkg::*;

  localparam int unsigned DEPTH  = 16;   // 64-bit words -> 64 samples
  localparam int unsigned CPB    = 4;
  localparam int unsigned SETTLE = 64;

  logic        sys_clk = 1'b0, ad_clk = 1'b0;
  logic        sys_rst, adc_config_rdy, trigger, uart_rxd;
  logic [7:0]  adc_data;
  logic        uart_txd, rx_valid;
  byte_t       rx_byte;
  daq_state_e  state;
  int          adc_index;
  int unsigned checks = 0, failures = 0;

  fsi_daq_top #(.FIFO_DEPTH(DEPTH), .CLKS_PER_BIT(CPB), .SETTLE_CYCLES(SETTLE)) dut (
    .sys_clk, .sys_rst, .ad_clk, .adc_data, .adc_config_rdy, .trigger,
    .uart_txd, .uart_rxd, .rx_valid, .rx_byte, .state);

  adc_ddr_model u_adc (.ad_clk, .data(adc_data), .index(adc_index));

  logic       mon_valid, mon_ferr;
  logic [7:0] mon_data;
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (
    .clk(sys_clk), .line(uart_txd), .valid(mon_valid), .data(mon_data), .frame_error(mon_ferr));

  always #5 sys_clk = ~sys_clk;      // 100 MHz
  always #3 ad_clk  = ~ad_clk;       // 166 MHz sampling clock

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample number from a sample value: value = n * 40503 + 17 (mod 2^16).
  int unsigned inv;
  initial for (int unsigned k = 1; k < 65536; k += 2) if (((k * 40503) & 16'hFFFF) == 1) inv = k;
  function automatic int index_of(sample_t v);
    return int'(((32'(v) - 17) * inv) & 32'hFFFF);
  endfunction

  // Bytes -> samples.
  int     rx_samples [$];
  logic   have_hb = 1'b0;
  byte_t  hb;
  int unsigned frame_errors = 0;
  always @(posedge sys_clk) begin
    if (mon_ferr) frame_errors++;
    if (mon_valid) begin
      if (!have_hb) begin
        hb = mon_data;
        have_hb = 1'b1;
      end else begin
        rx_samples.push_back(index_of({hb, mon_data}));
        have_hb = 1'b0;
      end
    end
  end

  // Mechanism counters, from the controller's transitions.
  int unsigned n_init_wait = 0, n_adcr_wait = 0, n_tr_stop = 0, n_fif_stop = 0;
  int unsigned n_drain_idle = 0, n_settle_idle = 0, n_hb = 0, n_lb = 0;
  int unsigned n_partial_drop = 0, n_ignored_sweep = 0, n_rx = 0;
  daq_state_e  prev_state = ST_INIT;
  always @(posedge sys_clk) begin
    if (!sys_rst) begin
      if (state == ST_INIT)   n_init_wait++;
      if (state == ST_IDLE && !dut.adcr) n_adcr_wait++;
      if (prev_state == ST_ACQUIRE && state == ST_TX_IDLE) begin
        if (dut.u_fsm.fif) n_fif_stop++;
        else               n_tr_stop++;
      end
      if (prev_state == ST_SEND_LB && state == ST_IDLE)  n_drain_idle++;
      if (prev_state == ST_TX_IDLE && state == ST_IDLE)  n_settle_idle++;
      if (prev_state != ST_SEND_HB && state == ST_SEND_HB) n_hb++;
      if (prev_state != ST_SEND_LB && state == ST_SEND_LB) n_lb++;
      if (dut.tf && state inside {ST_TX_IDLE, ST_SEND_HB, ST_SEND_LB}) n_ignored_sweep++;
      prev_state <= state;
    end
  end
  always @(posedge sys_clk) if (rx_valid) begin
    n_rx++;
    expect_true("received byte", rx_byte == 8'h5A);
  end

  int fall_idx, rise_idx, fall_b;

  task automatic sweep(int ad_cycles);
    @(posedge ad_clk);
    #1 trigger = 1'b0;
    fall_idx = adc_index;
    repeat (ad_cycles) @(posedge ad_clk);
    #1 trigger = 1'b1;
    rise_idx = adc_index;
  endtask

  task automatic wait_idle();
    int guard;
    guard = 0;
    // leave the acquisition, then wait for the return to ready
    while (state inside {ST_READY} && guard < 20) begin @(posedge sys_clk); guard++; end
    while (!(state inside {ST_IDLE, ST_READY}) && guard < 400000) begin
      @(posedge sys_clk);
      guard++;
    end
    repeat (20 * CPB) @(posedge sys_clk);   // last frame fully decoded
  endtask

  // Check one sweep's samples. `full` means the FIFO limit ended it.
  task automatic check_sweep(string name, int window, bit full);
    int n;
    n = rx_samples.size();
    $display("%s: %0d samples (trigger window %0d samples, from %0d)", name, n, window, fall_idx);
    expect_true({name, ": samples received"}, n > 0);
    expect_true({name, ": whole 64-bit words"}, n % 4 == 0);
    if (full) expect_true({name, ": FIFO-full run returns whole FIFO"}, n == int'(DEPTH) * 4);
    else      expect_true({name, ": at most a window of samples"}, n <= window + 4);
    if (n > 0) begin
      expect_true({name, ": starts after falling edge"}, rx_samples[0] > fall_idx);
      expect_true({name, ": starts within latency of falling edge"}, rx_samples[0] <= fall_idx + 16);
      if (!full) expect_true({name, ": ends within latency of rising edge"},
                             rx_samples[n-1] <= rise_idx + 16);
      for (int i = 1; i < n; i++)
        expect_true({name, ": consecutive samples"}, rx_samples[i] == rx_samples[i-1] + 1);
    end
    if (n < window) n_partial_drop++;
    rx_samples.delete();
  endtask

  initial begin
    sys_rst = 1'b1;
    adc_config_rdy = 1'b0;
    trigger = 1'b1;
    uart_rxd = 1'b1;
    repeat (10) @(posedge sys_clk);
    sys_rst = 1'b0;
    // ADC not yet configured.
    repeat (100) @(posedge sys_clk);
    expect_true("held in idle until ADC ready", state == ST_IDLE);
    adc_config_rdy = 1'b1;
    repeat (10) @(posedge sys_clk);
    expect_true("ready for acquisition", state == ST_READY);

    // A: ended by the rising trigger edge.
    sweep(30);
    wait_idle();
    check_sweep("sweep A", rise_idx - fall_idx, 1'b0);

    // B: longer than the FIFO; D arrives during B's transmission.
    sweep(400);
    fall_b = fall_idx;
    repeat (2000) @(posedge sys_clk);
    expect_true("transmitting B when D comes", state inside {ST_TX_IDLE, ST_SEND_HB, ST_SEND_LB});
    sweep(20);
    wait_idle();
    fall_idx = fall_b;
    check_sweep("sweep B", 400, 1'b1);

    // C: too short for one word.
    sweep(2);
    wait_idle();
    expect_true("sweep C yields nothing", rx_samples.size() == 0);

    // E: normal sweep after the ignored one.
    sweep(45);
    wait_idle();
    check_sweep("sweep E", rise_idx - fall_idx, 1'b0);

    // A byte into the receiver.
    begin
      logic [9:0] frame;
      frame = {1'b1, 8'h5A, 1'b0};
      for (int i = 0; i < 10; i++) begin
        uart_rxd = frame[i];
        repeat (CPB) @(posedge sys_clk);
      end
      uart_rxd = 1'b1;
      repeat (4 * CPB) @(posedge sys_clk);
    end

    expect_true("no UART frame errors", frame_errors == 0);
    expect_true("HB and LB counts match", n_hb == n_lb);
    $display("mechanisms: init_wait=%0d adcr_wait=%0d tr_stop=%0d fif_stop=%0d drain_to_idle=%0d",
             n_init_wait, n_adcr_wait, n_tr_stop, n_fif_stop, n_drain_idle);
    $display("            settle_timeout=%0d send_hb=%0d send_lb=%0d partial_word_drop=%0d ignored_sweep=%0d rx=%0d",
             n_settle_idle, n_hb, n_lb, n_partial_drop, n_ignored_sweep, n_rx);
    expect_true("mechanism: wait for FIFO reset busy",   n_init_wait > 0);
    expect_true("mechanism: wait for ADC ready",         n_adcr_wait > 0);
    expect_true("mechanism: stop on rising trigger",     n_tr_stop > 0);
    expect_true("mechanism: stop on FIFO full",          n_fif_stop > 0);
    expect_true("mechanism: return to idle on empty",    n_drain_idle > 0);
    expect_true("mechanism: settle timeout",             n_settle_idle > 0);
    expect_true("mechanism: high and low byte sent",     n_hb > 0 && n_lb > 0);
    expect_true("mechanism: partial word dropped",       n_partial_drop > 0);
    expect_true("mechanism: sweep ignored while sending", n_ignored_sweep > 0);
    expect_true("mechanism: UART receive",               n_rx == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
