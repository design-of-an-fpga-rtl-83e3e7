// fsi_daq_top: FPGA data-acquisition core for a frequency-scanning
// interferometer (FSI) sampled by a K-clock.
//
// An external dual-channel 16-bit ADC is clocked by the K-clock, so each
// sample falls at an equal step of optical frequency. It delivers samples on
// eight DDR LVDS lanes with its own output clock, AD CLK. This core captures
// one channel's samples during the laser's valid sweep (trigger low), buffers
// them on chip, and streams them to the host over a 460800-baud UART during
// the invalid part of the sweep (trigger high).
//
// Data path (AD CLK domain, then system clock domain):
//   ddr_interface  8-bit DDR lanes -> 16-bit samples
//   joint_numbers  four samples -> one 64-bit word, write clock = AD CLK / 4
//   async_fifo     64-bit write, 16-bit read, crosses into the system clock
//   byte_mux       high byte, then low byte of each sample
//   uart_core      8N1 serial transmitter (and receiver)
// Control (system clock): trigger_sync finds the trigger's edges, daq_fsm
// sequences acquisition and transmission. The FIFO write enable crosses into
// the AD CLK domain through a four-stage synchronizer; the ADC-configuration-
// ready input from the ADC module's microcontroller through another.
//
// Ports are single-ended: the FPGA's differential input buffers sit outside
// this core. Each sample leaves the UART as two bytes, high byte first, in
// the order the samples were taken. sys_rst is asynchronous and active high;
// it is bridged into each clock domain. Parameters: FIFO_DEPTH is the FIFO's
// depth in 64-bit words (131072, i.e. 524288 samples), CLKS_PER_BIT the UART
// bit time in system clocks (217 for 100 MHz), SETTLE_CYCLES the controller's
// wait for late FIFO words after an acquisition.
module fsi_daq_top
  import fsi_daq_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 131072,
  parameter int unsigned CLKS_PER_BIT  = fsi_daq_pkg::UART_CLKS_PER_BIT,
  parameter int unsigned SETTLE_CYCLES = 256
) (
  input  logic              sys_clk,
  input  logic              sys_rst,
  // ADC module
  input  logic              ad_clk,
  input  logic [LVDS_W-1:0] adc_data,
  input  logic              adc_config_rdy,
  // tunable laser
  input  logic              trigger,
  // serial port to the host
  output logic              uart_txd,
  input  logic              uart_rxd,
  output logic              rx_valid,
  output byte_t             rx_byte,
  // status
  output daq_state_e        state
);

  // ------------------------------------------------------------- resets
  logic rst_sys, rst_ad;
  reset_sync #(.STAGES(2)) u_rst_sys (.clk(sys_clk), .rst_in(sys_rst), .rst_out(rst_sys));
  reset_sync #(.STAGES(2)) u_rst_ad  (.clk(ad_clk),  .rst_in(sys_rst), .rst_out(rst_ad));

  // -------------------------------------------------- AD CLK domain path
  sample_t sample;
  logic    we, we_ad;
  logic    wr_clk;
  word_t   word;
  logic    word_valid;

  ddr_interface u_ddr (
    .ad_clk, .rst(rst_ad), .ddr_data(adc_data), .sample);

  sync_bits #(.WIDTH(1), .STAGES(4)) u_we_sync (
    .clk(ad_clk), .rst(rst_ad), .d(we), .q(we_ad));

  joint_numbers u_join (
    .ad_clk, .rst(rst_ad), .enable(we_ad), .din(sample),
    .wr_clk, .word, .word_valid);

  // --------------------------------------------------------------- FIFO
  sample_t fifo_dout;
  logic    re, fie, fif, wr_full, wrb, rrb;

  async_fifo #(
    .WR_W(WORD_W), .RD_W(SAMPLE_W), .WR_DEPTH(FIFO_DEPTH), .SYNC_STAGES(8)
  ) u_fifo (
    .rst(sys_rst),
    .wr_clk, .wr_en(word_valid), .din(word), .wr_full, .wr_rst_busy(wrb),
    .rd_clk(sys_clk), .rd_en(re), .dout(fifo_dout),
    .rd_empty(fie), .rd_full(fif), .rd_rst_busy(rrb));

  // ------------------------------------------------------- control path
  logic      adcr, tf, tr, trig_level;
  logic      tx_dv, tx_active, utxd;
  byte_sel_e byte_sel;
  byte_t     tx_byte;

  sync_bits #(.WIDTH(1), .STAGES(4)) u_adcr_sync (
    .clk(sys_clk), .rst(rst_sys), .d(adc_config_rdy), .q(adcr));

  trigger_sync #(.STAGES(4)) u_trig (
    .clk(sys_clk), .rst(rst_sys), .trigger, .level(trig_level), .tf, .tr);

  daq_fsm #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_fsm (
    .clk(sys_clk), .rst(rst_sys), .rrb, .wrb, .adcr, .tf, .tr, .fif, .fie,
    .utxd, .we, .re, .tx_dv, .byte_sel, .state);

  byte_mux u_mux (.din(fifo_dout), .sel(byte_sel), .dout(tx_byte));

  uart_core #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(sys_clk), .rst(rst_sys), .tx_dv, .tx_byte, .tx_serial(uart_txd),
    .tx_active, .tx_done(utxd), .rx_serial(uart_rxd), .rx_dv(rx_valid), .rx_byte);

endmodule
