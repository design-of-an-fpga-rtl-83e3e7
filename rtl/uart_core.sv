// uart_core: the DAQ's serial port, a transmitter and a receiver sharing one
// baud rate (460800 baud, 8 data bits, no parity, one stop bit).
//
// The transmitter carries the acquired samples to the host: the controller
// raises tx_dv for one cycle with a byte on tx_byte and waits for the
// one-cycle tx_done pulse (the "transmit done" handshake) before offering
// the next byte. The receiver is present on the serial port but the design
// gives its bytes no function; they are brought out as rx_dv/rx_byte.
// CLKS_PER_BIT defaults to a 100 MHz system clock divided down to 460800
// baud (217 cycles per bit, 0.005 % fast). See uart_tx and uart_rx for the
// frame timing.
module uart_core
  import fsi_daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = fsi_daq_pkg::UART_CLKS_PER_BIT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tx_dv,
  input  byte_t tx_byte,
  output logic  tx_serial,
  output logic  tx_active,
  output logic  tx_done,
  input  logic  rx_serial,
  output logic  rx_dv,
  output byte_t rx_byte
);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .tx_dv, .tx_byte, .tx_serial, .tx_active, .tx_done);

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rx_serial, .rx_dv, .rx_byte);

  // A new byte may only be offered when the transmitter is idle.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(tx_dv && tx_active))
      else $error("uart_core: tx_dv while a frame is in progress");
  end

endmodule
