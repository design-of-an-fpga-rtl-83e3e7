// ddr_interface: turns the ADC's 8-lane double-data-rate output into 16-bit
// samples in the AD CLK domain.
//
// The ADC sends each 16-bit sample over eight lanes in two halves: the even
// bits (D0, D2, ... D14) are sampled on a falling edge of AD CLK and the odd
// bits (D1, D3, ... D15) on the following rising edge, lane j carrying D2j
// and D2j+1. Three registers do the work, as in the design this follows:
//   ff_fall (FF1)  samples the lanes on the falling edge  -> even bits
//   ff_rise (FF2)  samples the lanes on the rising edge   -> odd bits
//   ff_word (FF3)  on the next falling edge takes both halves, interleaved
//                  into bit order, and holds the sample for a whole period
// The sample therefore changes on falling edges and is stable around every
// rising edge, where the next stage (joint_numbers) takes it. Latency from
// the odd half on the lanes to the sample at the output is half a period.
//
// Only FF3 has a reset (asynchronous, active high), as in the original
// arrangement; FF1 and FF2 are overwritten on every edge. Which falling edge
// starts a word is fixed by the output-clock phase the ADC is configured
// with; this module assumes the even half comes first. The differential input
// buffers in front of this module are FPGA primitives and are not part of it:
// ad_clk and ddr_data are the single-ended buffer outputs.
module ddr_interface
  import fsi_daq_pkg::*;
(
  input  logic              ad_clk,
  input  logic              rst,
  input  logic [LVDS_W-1:0] ddr_data,
  output sample_t           sample
);

  logic [LVDS_W-1:0] ff_fall;  // even bits
  logic [LVDS_W-1:0] ff_rise;  // odd bits
  sample_t           ff_word;

  always_ff @(negedge ad_clk) ff_fall <= ddr_data;
  always_ff @(posedge ad_clk) ff_rise <= ddr_data;

  // Interleave lane j's two bits into sample bits 2j (even) and 2j+1 (odd).
  sample_t joined;
  always_comb begin
    for (int j = 0; j < LVDS_W; j++) begin
      joined[2*j]   = ff_fall[j];
      joined[2*j+1] = ff_rise[j];
    end
  end

  always_ff @(negedge ad_clk or posedge rst) begin
    if (rst) ff_word <= '0;
    else     ff_word <= joined;
  end

  assign sample = ff_word;

endmodule
