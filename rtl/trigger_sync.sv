// trigger_sync: brings the tunable laser's sweep trigger into the system
// clock domain and reports its edges.
//
// The trigger is asynchronous to the FPGA. It passes through a STAGES-deep
// flip-flop synchronizer (four stages by default) and one more register; the
// controller then sees
//   tf  one-cycle pulse on a falling edge: a valid sweep starts,
//   tr  one-cycle pulse on a rising edge:  the valid sweep has ended,
//   level the synchronized trigger itself.
// Latency from the pin to a pulse is STAGES+1 system-clock cycles. The
// synchronizer resets to the trigger's idle (high) level so that leaving
// reset does not produce a false edge. Asynchronous, active-high reset.
module trigger_sync #(
  parameter int unsigned STAGES = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic trigger,
  output logic level,
  output logic tf,
  output logic tr
);

  logic s, s_q;

  sync_bits #(.WIDTH(1), .STAGES(STAGES), .RST_VAL(1'b1)) u_sync (
    .clk(clk), .rst(rst), .d(trigger), .q(s));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) s_q <= 1'b1;
    else     s_q <= s;
  end

  assign level = s_q;
  assign tf    = s_q && !s;
  assign tr    = !s_q && s;

endmodule
