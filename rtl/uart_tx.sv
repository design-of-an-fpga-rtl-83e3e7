// uart_tx: 8N1 UART transmitter with a valid/done handshake.
//
// A one-cycle tx_dv pulse while the transmitter is idle latches tx_byte and
// starts a frame: one start bit (0), eight data bits LSB first, one stop bit
// (1), each CLKS_PER_BIT clock cycles long. tx_done pulses for one cycle at
// the end of the stop bit, when the line is free again; tx_active is high
// from the start bit to the end of the stop bit. A tx_dv that arrives while
// a frame is in progress is ignored. The line idles high. Synchronous,
// active-high reset.
module uart_tx
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
  output logic  tx_done
);

  typedef enum logic [1:0] {TX_IDLE, TX_START, TX_DATA, TX_STOP} tx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  tx_state_e     state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  byte_t         shreg;

  wire bit_end = (clk_cnt == CW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= TX_IDLE;
      clk_cnt   <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      tx_serial <= 1'b1;
      tx_done   <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      clk_cnt <= bit_end ? '0 : clk_cnt + 1'b1;
      unique case (state)
        TX_IDLE: begin
          tx_serial <= 1'b1;
          clk_cnt   <= '0;
          if (tx_dv) begin
            shreg     <= tx_byte;
            tx_serial <= 1'b0;
            state     <= TX_START;
          end
        end
        TX_START: if (bit_end) begin
          tx_serial <= shreg[0];
          bit_idx   <= '0;
          state     <= TX_DATA;
        end
        TX_DATA: if (bit_end) begin
          if (bit_idx == 3'd7) begin
            tx_serial <= 1'b1;
            state     <= TX_STOP;
          end else begin
            bit_idx   <= bit_idx + 3'd1;
            tx_serial <= shreg[bit_idx + 3'd1];
          end
        end
        TX_STOP: if (bit_end) begin
          tx_done <= 1'b1;
          state   <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign tx_active = (state != TX_IDLE);

endmodule
