// daq_fsm: the controller that sequences one measurement: wait for the
// ADC to be configured, fill the FIFO during the laser's valid sweep, and
// empty it over the UART during the invalid part of the sweep.
//
// States (numbered as in the design's state diagram) and what moves them:
//   1 INIT      after reset; leaves when the FIFO's read and write
//               reset-busy flags (rrb, wrb) have both dropped.
//   2 IDLE      waits for the ADC-configuration-ready signal (adcr).
//   3 READY     waits for a falling trigger edge (tf) = start of a sweep.
//   4 ACQUIRE   FIFO write enable (we) high; ends on a rising trigger edge
//               (tr) or when the FIFO is full (fif).
//   5 TX_IDLE   pulses the FIFO read enable (re) for one cycle; the word is
//               on the FIFO output the cycle after, in state 6.
//   6 SEND_HB   tx_dv pulses on entry with the high byte selected; waits for
//               the UART's transmit-done pulse (utxd).
//   7 SEND_LB   tx_dv pulses on entry with the low byte selected; on utxd
//               returns to 5 while the FIFO still holds data (fie low) and
//               to 2 once it is empty (fie high).
// One addition to that sequence: state 5 reads only when the FIFO is not
// empty. The write side's last words need a few cycles to become visible
// through the FIFO's synchronizers, so on the first entry after an
// acquisition the empty flag can still be set; the controller waits up to
// SETTLE_CYCLES cycles in state 5 and returns to IDLE if nothing appears
// (for example a sweep too short to fill one 64-bit word).
//
// All inputs must be synchronous to clk (the trigger edges come from
// trigger_sync, adcr through a synchronizer). Outputs: we and byte_sel are
// decoded from the state; re is high for one cycle in state 5; tx_dv is a
// registered one-cycle pulse on entry to states 6 and 7. Synchronous,
// active-high reset.
module daq_fsm
  import fsi_daq_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rrb,
  input  logic       wrb,
  input  logic       adcr,
  input  logic       tf,
  input  logic       tr,
  input  logic       fif,
  input  logic       fie,
  input  logic       utxd,
  output logic       we,
  output logic       re,
  output logic       tx_dv,
  output byte_sel_e  byte_sel,
  output daq_state_e state
);

  localparam int unsigned SW = $clog2(SETTLE_CYCLES + 1);

  daq_state_e    next;
  logic [SW-1:0] settle;

  always_comb begin
    next = state;
    re   = 1'b0;
    unique case (state)
      ST_INIT:    if (!rrb && !wrb) next = ST_IDLE;
      ST_IDLE:    if (adcr)         next = ST_READY;
      ST_READY:   if (tf)           next = ST_ACQUIRE;
      ST_ACQUIRE: if (fif || tr)    next = ST_TX_IDLE;
      ST_TX_IDLE: begin
        if (!fie) begin
          re   = 1'b1;
          next = ST_SEND_HB;
        end else if (settle == SW'(SETTLE_CYCLES)) begin
          next = ST_IDLE;
        end
      end
      ST_SEND_HB: if (utxd)         next = ST_SEND_LB;
      ST_SEND_LB: if (utxd)         next = fie ? ST_IDLE : ST_TX_IDLE;
      default:                      next = ST_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_INIT;
      tx_dv  <= 1'b0;
      settle <= '0;
    end else begin
      state  <= next;
      tx_dv  <= (next != state) && (next == ST_SEND_HB || next == ST_SEND_LB);
      settle <= (state == ST_TX_IDLE && next == ST_TX_IDLE) ? settle + 1'b1 : '0;
    end
  end

  assign we       = (state == ST_ACQUIRE);
  assign byte_sel = (state == ST_SEND_HB) ? SEL_HB : SEL_LB;

  // Handshake rules: never write and read in the same cycle, and a byte is
  // only offered in a send state.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(we && re)) else $error("daq_fsm: write and read enable together");
      assert (!tx_dv || state == ST_SEND_HB || state == ST_SEND_LB)
        else $error("daq_fsm: tx_dv outside a send state");
    end
  end

endmodule
