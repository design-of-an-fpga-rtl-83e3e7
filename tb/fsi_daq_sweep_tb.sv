// fsi_daq_sweep_tb: full-length laser sweeps through the DAQ core at its
// default parameters, to show that one sweep of the intended measurement
// fits the on-chip buffer.
//
// A 1530-1560 nm sweep spans 3.77 THz; with a 22.44 m auxiliary path
// mismatch the K-clock gives about 282,000 samples per sweep if 22.44 m is
// the optical path difference, or about 414,000 if it is a fibre length
// (group index about 1.47). Each of three runs resets the core, plays one
// sweep of the given length and checks what the FIFO holds:
//   282,000 and 414,000 samples: acquisition ends on the trigger's rising
//     edge, not on FIFO full, and the FIFO holds the sweep less at most a
//     few words lost to synchronizer latency and partial words;
//   600,000 samples: longer than the buffer, acquisition ends on FIFO full
//     with exactly 131072 words (524,288 samples) stored.
// Sending a whole sweep over the 460800-baud UART would take 12-23 s of
// simulated time, so each run checks the first 48 samples on the serial line
// (consecutive ADC samples, high byte first) and then resets. The sampling
// clock runs at 160 MHz to keep the run short; the core does not depend on
// its rate.
module fsi_daq_sweep_tb;
  import fsi_daq_pkg::*;

  localparam int unsigned CPB = UART_CLKS_PER_BIT;

  logic        sys_clk = 1'b0, ad_clk = 1'b0;
  logic        sys_rst, adc_config_rdy, trigger, uart_rxd;
  logic [7:0]  adc_data;
  logic        uart_txd, rx_valid;
  byte_t       rx_byte;
  daq_state_e  state;
  int          adc_index;
  int unsigned checks = 0, failures = 0;

  fsi_daq_top dut (
    .sys_clk, .sys_rst, .ad_clk, .adc_data, .adc_config_rdy, .trigger,
    .uart_txd, .uart_rxd, .rx_valid, .rx_byte, .state);

  adc_ddr_model u_adc (.ad_clk, .data(adc_data), .index(adc_index));

  logic       mon_valid, mon_ferr;
  logic [7:0] mon_data;
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (
    .clk(sys_clk), .line(uart_txd), .valid(mon_valid), .data(mon_data), .frame_error(mon_ferr));

  always #5     sys_clk = ~sys_clk;   // 100 MHz
  always #3.125 ad_clk  = ~ad_clk;    // 160 MHz

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned inv;
  initial for (int unsigned k = 1; k < 65536; k += 2) if (((k * 40503) & 16'hFFFF) == 1) inv = k;
  function automatic int index_of(sample_t v);
    return int'(((32'(v) - 17) * inv) & 32'hFFFF);
  endfunction

  int     rx_samples [$];
  logic   have_hb = 1'b0;
  byte_t  hb;
  always @(posedge sys_clk) begin
    if (sys_rst) begin
      have_hb = 1'b0;
    end else if (mon_valid) begin
      if (!have_hb) begin
        hb = mon_data;
        have_hb = 1'b1;
      end else begin
        rx_samples.push_back(index_of({hb, mon_data}));
        have_hb = 1'b0;
      end
    end
  end

  logic stopped_by_full;
  always @(posedge sys_clk)
    if (state == ST_ACQUIRE && dut.u_fsm.fif) stopped_by_full = 1'b1;

  task automatic run(int samples);
    int fall_idx, words;
    rx_samples.delete();
    stopped_by_full = 1'b0;
    sys_rst = 1'b1;
    repeat (10) @(posedge sys_clk);
    sys_rst = 1'b0;
    wait (state == ST_READY);
    @(posedge ad_clk);
    #1 trigger = 1'b0;
    fall_idx = adc_index;
    while (adc_index - fall_idx < samples && state inside {ST_READY, ST_ACQUIRE})
      @(posedge ad_clk);
    #1 trigger = 1'b1;
    repeat (50) @(posedge sys_clk);
    words = int'(dut.u_fifo.wptr_bin);
    if (dut.u_fifo.wptr_bin[$clog2(131072)]) words = 131072;
    $display("sweep of %0d samples: %0d words (%0d samples) stored, FIFO full: %0b",
             samples, words, 4 * words, stopped_by_full);
    if (samples <= 524288) begin
      expect_true("sweep ended by the trigger", !stopped_by_full);
      expect_true("whole sweep stored", 4 * words >= samples - 24 && 4 * words <= samples);
    end else begin
      expect_true("sweep ended by FIFO full", stopped_by_full);
      expect_true("FIFO holds exactly 524288 samples", words == 131072);
    end
    // first 48 samples over the UART
    while (rx_samples.size() < 48) @(posedge sys_clk);
    expect_true("first sample near the start of the sweep",
                ((rx_samples[0] - fall_idx) & 16'hFFFF) inside {[1:16]});
    for (int i = 1; i < 48; i++)
      expect_true("consecutive samples", ((rx_samples[i] - rx_samples[i-1]) & 16'hFFFF) == 1);
  endtask

  initial begin
    sys_rst = 1'b1;
    adc_config_rdy = 1'b1;
    trigger = 1'b1;
    uart_rxd = 1'b1;
    run(282000);
    run(414000);
    run(600000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
