// reset_sync: reset bridge for one clock domain.
//
// The reset is asserted at once, asynchronously, and released synchronously
// after STAGES edges of the destination clock, so every flip-flop of the
// domain leaves reset on the same edge. Both input and output are active high.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) chain <= '1;
    else        chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign rst_out = chain[STAGES-1];

endmodule
