// joint_numbers: packs four consecutive 16-bit samples into one 64-bit FIFO
// word and makes the FIFO's write clock, AD CLK divided by four.
//
// Four registers FF1..FF4 form a shift chain clocked on the rising edge of
// AD CLK; FF1 takes the new sample and each later stage takes its
// neighbour's. In front of each register a multiplexer selects zero while
// `enable` is low, so the chain is cleared between measurements. Every fourth
// edge FF5 takes the whole chain, FF1 (newest sample) in bits 15:0 and FF4
// (oldest) in bits 63:48.
//
// Timing. A free-running two-bit counter divides AD CLK by four; wr_clk is
// its upper bit. FF5 loads on the edge where the counter wraps, and wr_clk
// rises two AD CLK periods later, so `word` and `word_valid` are stable for
// two AD CLK periods on either side of every wr_clk rising edge. FF5 is built
// as a register in the AD CLK domain with a load enable rather than a
// register clocked by the divided clock; it loads at the same rate.
//
// word_valid marks a word whose four samples were all taken while `enable`
// was high. A word that straddles the start or end of a measurement is
// dropped rather than padded with the cleared zeros, so up to three samples
// at each end of a measurement are not stored. `enable` must already be
// synchronous to ad_clk. Reset is asynchronous and active high.
module joint_numbers
  import fsi_daq_pkg::*;
(
  input  logic    ad_clk,
  input  logic    rst,
  input  logic    enable,
  input  sample_t din,
  output logic    wr_clk,
  output word_t   word,
  output logic    word_valid
);

  sample_t     chain [PACK];   // chain[0] = FF1 ... chain[PACK-1] = FF4
  logic [1:0]  div_cnt;
  logic [2:0]  fill;           // samples taken since enable rose, saturates at PACK

  always_ff @(posedge ad_clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < PACK; i++) chain[i] <= '0;
    end else begin
      chain[0] <= enable ? din : '0;
      for (int i = 1; i < PACK; i++) chain[i] <= enable ? chain[i-1] : '0;
    end
  end

  always_ff @(posedge ad_clk or posedge rst) begin
    if (rst)          fill <= '0;
    else if (!enable) fill <= '0;
    else if (fill != 3'(PACK)) fill <= fill + 3'd1;
  end

  always_ff @(posedge ad_clk or posedge rst) begin
    if (rst) div_cnt <= '0;
    else     div_cnt <= div_cnt + 2'd1;
  end

  // FF5.
  always_ff @(posedge ad_clk or posedge rst) begin
    if (rst) begin
      word       <= '0;
      word_valid <= 1'b0;
    end else if (div_cnt == 2'd3) begin
      for (int i = 0; i < PACK; i++) word[i*SAMPLE_W +: SAMPLE_W] <= chain[i];
      word_valid <= (fill == 3'(PACK));
    end
  end

  assign wr_clk = div_cnt[1];

endmodule
