// async_fifo: independent-clock FIFO that carries the packed 64-bit sample
// words from the ADC's clock domain into the system clock domain and buffers
// a whole measurement.
//
// The write side takes WR_W-bit words; the read side returns RD_W-bit slices
// of them, most significant slice first, so the 64-bit word built by
// joint_numbers (oldest sample in the top bits) comes out as its four
// samples in the order they were taken. With the default 131072-word write
// depth the FIFO holds 524288 16-bit samples (8 Mbit of block RAM).
//
// How it works. The storage is one WR_W-bit wide array, written at the write
// pointer and read synchronously at the read pointer's word part plus a slice
// select; that form maps onto block RAM. Write and read pointers carry one
// extra wrap bit; each is Gray-coded and passed to the other side through a
// SYNC_STAGES-deep synchronizer (eight by default). The read pointer counts
// slices, and a word's space is handed back to the writer once its last slice
// is read.
//
// Interface and timing.
//   write: din is stored on a rising wr_clk edge when wr_en is high and
//          wr_full is low; writes while full are dropped.
//   read:  standard (not first-word-fall-through) mode: with rd_en high and
//          rd_empty low on a rising rd_clk edge, dout shows the next slice
//          after that edge and holds it until the next read.
//   rd_empty and wr_full see the other side's pointer through the
//          synchronizers, so they may stay set a few cycles longer than
//          needed but never clear early. rd_full, the full flag as the read
//          side sees it, sets a few cycles after wr_full; it is a status
//          for the controller, and writes in between are dropped.
//   rst (asynchronous, active high) clears both sides; each side's
//          *_rst_busy stays high until the reset has been released in its
//          own domain, and the side ignores reads or writes until then.
module async_fifo #(
  parameter int unsigned WR_W        = 64,
  parameter int unsigned RD_W        = 16,
  parameter int unsigned WR_DEPTH    = 131072,
  parameter int unsigned SYNC_STAGES = 8
) (
  input  logic            rst,
  // write side
  input  logic            wr_clk,
  input  logic            wr_en,
  input  logic [WR_W-1:0] din,
  output logic            wr_full,
  output logic            wr_rst_busy,
  // read side
  input  logic            rd_clk,
  input  logic            rd_en,
  output logic [RD_W-1:0] dout,
  output logic            rd_empty,
  output logic            rd_full,
  output logic            rd_rst_busy
);

  localparam int unsigned RATIO = WR_W / RD_W;
  localparam int unsigned AW    = $clog2(WR_DEPTH);
  localparam int unsigned SW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WR_W-1:0] mem [WR_DEPTH];

  // ---------------------------------------------------------------- resets
  logic wrst, rrst;
  reset_sync #(.STAGES(SYNC_STAGES)) u_wrst (.clk(wr_clk), .rst_in(rst), .rst_out(wrst));
  reset_sync #(.STAGES(SYNC_STAGES)) u_rrst (.clk(rd_clk), .rst_in(rst), .rst_out(rrst));
  assign wr_rst_busy = wrst;
  assign rd_rst_busy = rrst;

  // ------------------------------------------------------------ write side
  ptr_t wptr_bin, wptr_gray, rq_gray, rq_bin;
  ptr_t rptr_word, rptr_gray, wq_gray, wq_bin;
  logic do_write, do_read;

  sync_bits #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_r2w (
    .clk(wr_clk), .rst(wrst), .d(rptr_gray), .q(rq_gray));
  assign rq_bin  = gray2bin(rq_gray);
  assign wr_full = (wptr_bin[AW] != rq_bin[AW]) && (wptr_bin[AW-1:0] == rq_bin[AW-1:0]);
  assign do_write = wr_en && !wr_full && !wrst;

  always_ff @(posedge wr_clk or posedge wrst) begin
    if (wrst) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
    end else if (do_write) begin
      wptr_bin  <= wptr_bin + 1'b1;
      wptr_gray <= bin2gray(wptr_bin + 1'b1);
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wptr_bin[AW-1:0]] <= din;
  end

  // ------------------------------------------------------------- read side
  // rd_slice counts slices: its upper bits are the word pointer, its low SW
  // bits the slice number within the word (0 = most significant slice).
  logic [AW+SW:0] rd_slice;

  assign rptr_word = rd_slice[AW+SW:SW];

  sync_bits #(.WIDTH(AW+1), .STAGES(SYNC_STAGES)) u_w2r (
    .clk(rd_clk), .rst(rrst), .d(wptr_gray), .q(wq_gray));
  assign wq_bin   = gray2bin(wq_gray);
  assign rd_empty = (rptr_word == wq_bin);
  assign rd_full  = (rptr_word[AW] != wq_bin[AW]) && (rptr_word[AW-1:0] == wq_bin[AW-1:0]);
  assign do_read  = rd_en && !rd_empty && !rrst;

  logic [SW-1:0] slice_sel;
  assign slice_sel = (RATIO > 1) ? rd_slice[SW-1:0] : '0;

  always_ff @(posedge rd_clk or posedge rrst) begin
    if (rrst) begin
      rd_slice  <= '0;
      rptr_gray <= '0;
    end else if (do_read) begin
      if (RATIO == 1 || slice_sel == SW'(RATIO - 1)) begin
        // Last slice of the word: move to the next word.
        rd_slice  <= {rptr_word + 1'b1, {SW{1'b0}}};
        rptr_gray <= bin2gray(rptr_word + 1'b1);
      end else begin
        rd_slice  <= rd_slice + 1'b1;
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (do_read)
      dout <= mem[rptr_word[AW-1:0]][(RATIO - 1 - int'(slice_sel)) * RD_W +: RD_W];
  end

  // ------------------------------------------------------------ properties
  initial begin
    assert (WR_W % RD_W == 0 && WR_W >= RD_W)
      else $error("write width must be a multiple of read width");
    assert (WR_DEPTH == (1 << AW)) else $error("WR_DEPTH must be a power of two");
  end

  // The reader can never run past the words the writer has published.
  always_ff @(posedge rd_clk) begin
    if (!rrst) assert ((wq_bin - rptr_word) <= ptr_t'(WR_DEPTH))
      else $error("async_fifo: read pointer passed write pointer");
  end

endmodule
