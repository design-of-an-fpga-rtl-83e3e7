// fsi_daq_top_full_tb: one complete measurement through the DAQ core with
// every parameter at its default: the 131072-word (524288-sample) FIFO,
// 217 system clocks per UART bit (460800 baud at 100 MHz) and the default
// settle time. The 100 MHz system clock and a 160 MHz sampling clock run
// side by side. After the ADC-ready signal, one sweep of 120 sampling-clock
// periods is played on the trigger; the test then waits for the controller
// to send everything and return to idle, decodes the UART line and checks
// that the samples are consecutive ADC samples from inside the sweep, in
// whole 64-bit words, each sent as high byte then low byte, and that a byte
// takes ten bit times on the line.
module fsi_daq_top_full_tb;
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
    #20ms;
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

  // Byte time on the line: cycles between consecutive tx_dv pulses of one word.
  longint unsigned t_hb, t_lb;
  int unsigned     byte_time_checked = 0;
  always @(posedge sys_clk) begin
    if (dut.tx_dv && state == ST_SEND_HB) t_hb = $time;
    if (dut.tx_dv && state == ST_SEND_LB) begin
      t_lb = $time;
      if (byte_time_checked < 4) begin
        // ten bit times plus the controller's two-cycle turnaround
        expect_true("byte takes ten bit times", (t_lb - t_hb) / 10 == 10 * CPB + 2);
        byte_time_checked++;
      end
    end
  end

  int fall_idx, rise_idx;

  initial begin
    sys_rst = 1'b1;
    adc_config_rdy = 1'b0;
    trigger = 1'b1;
    uart_rxd = 1'b1;
    repeat (10) @(posedge sys_clk);
    sys_rst = 1'b0;
    repeat (50) @(posedge sys_clk);
    expect_true("idle until ADC ready", state == ST_IDLE);
    adc_config_rdy = 1'b1;
    repeat (10) @(posedge sys_clk);
    expect_true("ready for acquisition", state == ST_READY);

    @(posedge ad_clk);
    #1 trigger = 1'b0;
    fall_idx = adc_index;
    repeat (120) @(posedge ad_clk);
    #1 trigger = 1'b1;
    rise_idx = adc_index;

    repeat (20) @(posedge sys_clk);
    expect_true("transmitting after the sweep", state inside {ST_TX_IDLE, ST_SEND_HB, ST_SEND_LB});
    wait (state == ST_READY);
    repeat (20 * CPB) @(posedge sys_clk);

    begin
      int n;
      n = rx_samples.size();
      $display("full-size run: %0d samples received from a %0d-sample sweep", n, rise_idx - fall_idx);
      expect_true("samples received", n >= 100);
      expect_true("whole 64-bit words", n % 4 == 0);
      expect_true("no more than the sweep", n <= rise_idx - fall_idx);
      if (n > 0) begin
        expect_true("starts after the falling edge", rx_samples[0] > fall_idx);
        expect_true("ends within latency of the rising edge", rx_samples[n-1] <= rise_idx + 16);
        for (int i = 1; i < n; i++)
          expect_true("consecutive samples", rx_samples[i] == rx_samples[i-1] + 1);
      end
    end
    expect_true("byte time measured", byte_time_checked == 4);
    expect_true("no frame errors", frame_errors == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
