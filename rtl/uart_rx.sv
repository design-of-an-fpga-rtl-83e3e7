// uart_rx: 8N1 UART receiver.
//
// rx_serial is first passed through a two-stage synchronizer. A falling edge
// on the idle-high line is taken as a start bit, confirmed at its middle;
// each data bit (LSB first) is then sampled CLKS_PER_BIT cycles after the
// previous sample point, i.e. mid-bit. After the stop bit's middle, rx_dv
// pulses for one cycle with the byte on rx_byte if the stop bit was 1;
// a frame with a bad stop bit is discarded. Synchronous, active-high reset.
module uart_rx
  import fsi_daq_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = fsi_daq_pkg::UART_CLKS_PER_BIT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rx_serial,
  output logic  rx_dv,
  output byte_t rx_byte
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          rx_s;
  rx_state_e     state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;

  sync_bits #(.WIDTH(1), .STAGES(2), .RST_VAL(1'b1)) u_sync (
    .clk(clk), .rst(rst), .d(rx_serial), .q(rx_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= RX_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      rx_dv   <= 1'b0;
      rx_byte <= '0;
    end else begin
      rx_dv <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          clk_cnt <= '0;
          if (!rx_s) state <= RX_START;
        end
        RX_START: begin
          if (clk_cnt == CW'((CLKS_PER_BIT - 1) / 2)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= rx_s ? RX_IDLE : RX_DATA;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        RX_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt          <= '0;
            rx_byte[bit_idx] <= rx_s;
            if (bit_idx == 3'd7) state <= RX_STOP;
            else                 bit_idx <= bit_idx + 3'd1;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        RX_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            rx_dv   <= rx_s;
            state   <= RX_IDLE;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
