// fsi_daq_pkg: types and constants shared by the FSI data-acquisition blocks.
//
// The acquisition path moves 16-bit ADC samples; four of them are packed
// into one 64-bit FIFO write word and read back 16 bits at a time, and each
// 16-bit word leaves over the UART as a high byte followed by a low byte.
// The controller's seven states follow the numbering of the state diagram
// the design is built from (1 Init ... 7 Send LB). The 100 MHz system clock
// is the board oscillator this design assumes; 460800 baud is the design's
// UART rate.
package fsi_daq_pkg;

  localparam int unsigned SAMPLE_W   = 16;
  localparam int unsigned LVDS_W     = 8;
  localparam int unsigned PACK       = 4;
  localparam int unsigned WORD_W     = SAMPLE_W * PACK;
  localparam int unsigned BYTE_W     = 8;

  localparam int unsigned SYS_CLK_HZ = 100_000_000;
  localparam int unsigned BAUD       = 460_800;
  // Rounded to the nearest integer: 100e6 / 460800 = 217.01.
  localparam int unsigned UART_CLKS_PER_BIT = (SYS_CLK_HZ + BAUD / 2) / BAUD;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [BYTE_W-1:0]   byte_t;

  // Controller states, encoded with the diagram's state numbers.
  typedef enum logic [2:0] {
    ST_INIT     = 3'd1,
    ST_IDLE     = 3'd2,
    ST_READY    = 3'd3,
    ST_ACQUIRE  = 3'd4,
    ST_TX_IDLE  = 3'd5,
    ST_SEND_HB  = 3'd6,
    ST_SEND_LB  = 3'd7
  } daq_state_e;

  // Byte select for the UART multiplexer.
  typedef enum logic {
    SEL_LB = 1'b0,
    SEL_HB = 1'b1
  } byte_sel_e;

endpackage
