// sync_bits: multi-stage flip-flop synchronizer for signals entering a clock
// domain.
//
// Each bit passes through STAGES flip-flops clocked by the destination clock,
// so a value that goes metastable in the first stage has STAGES-1 further
// clock periods to settle. Latency is STAGES destination-clock cycles. Only
// single bits or Gray-coded buses may be passed, because the bits of a bus are
// not guaranteed to arrive in the same cycle. The chain resets to RST_VAL
// through an asynchronous, active-high reset.
module sync_bits #(
  parameter int unsigned    WIDTH   = 1,
  parameter int unsigned    STAGES  = 2,
  parameter logic [WIDTH-1:0] RST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] chain [STAGES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) chain[i] <= RST_VAL;
    end else begin
      chain[0] <= d;
      for (int i = 1; i < STAGES; i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_bits needs at least two stages");

endmodule
