// async_fifo_tb: self-checking test of the independent-clock FIFO with a
// 64-bit write port and a 16-bit read port.
//
// Write clock 40 ns, read clock 7 ns (unrelated). A reference queue holds
// the expected 16-bit slices, most significant slice of each word first.
// Phases: (1) reset-busy flags clear after reset; (2) the writer runs with
// the reader stopped until the FIFO reports full on both sides, and further
// writes are dropped; (3) both sides run at random rates; (4) the reader
// drains until empty. Every read is compared with the reference queue, and
// the flags are checked against the number of words known to be stored.
module async_fifo_tb;

  localparam int unsigned DEPTH = 16;

  logic        rst;
  logic        wr_clk = 1'b0, rd_clk = 1'b0;
  logic        wr_en, rd_en;
  logic [63:0] din;
  logic [15:0] dout;
  logic        wr_full, rd_empty, rd_full, wr_rst_busy, rd_rst_busy;
  int unsigned checks = 0, failures = 0;

  async_fifo #(.WR_W(64), .RD_W(16), .WR_DEPTH(DEPTH), .SYNC_STAGES(8)) dut (
    .rst, .wr_clk, .wr_en, .din, .wr_full, .wr_rst_busy,
    .rd_clk, .rd_en, .dout, .rd_empty, .rd_full, .rd_rst_busy);

  always #20 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ref_q [$];
  int unsigned writes = 0, reads = 0, dropped = 0;
  int          wr_rate = 0, rd_rate = 0;   // percent
  logic        wr_stop = 1'b1, rd_stop = 1'b1;

  // Writer: at the falling edge choose what the next rising edge sees; the
  // flags cannot change before that edge.
  always @(negedge wr_clk) begin
    logic        en_next;
    logic [63:0] din_next;
    en_next  = !wr_stop && (int'($urandom_range(1, 100)) <= wr_rate);
    din_next = {$urandom, $urandom};
    if (en_next && wr_full && !wr_rst_busy) dropped++;
    if (en_next && !wr_full && !wr_rst_busy) begin
      for (int i = 3; i >= 0; i--) ref_q.push_back(din_next[i*16 +: 16]);
      writes++;
    end
    wr_en <= en_next;
    din   <= din_next;
  end

  // Reader: decide at the falling edge, check just after the rising edge.
  logic rd_will = 1'b0;
  always @(negedge rd_clk) begin
    rd_en   <= !rd_stop && (int'($urandom_range(1, 100)) <= rd_rate);
  end
  always @(posedge rd_clk) begin
    rd_will = rd_en && !rd_empty && !rd_rst_busy;
    if (rd_will) begin
      logic [15:0] exp;
      #1;
      checks++;
      if (ref_q.size() == 0) begin
        failures++;
        $display("FAIL read with nothing written at %0t", $time);
      end else begin
        exp = ref_q.pop_front();
        if (dout !== exp) begin
          failures++;
          $display("FAIL read %0d: got %h expected %h", reads, dout, exp);
        end
      end
      reads++;
    end
  end

  initial begin
    rst = 1'b1;
    wr_en = 1'b0;
    rd_en = 1'b0;
    din = '0;
    #200;
    expect_true("write side busy during reset", wr_rst_busy);
    expect_true("read side busy during reset", rd_rst_busy);
    rst = 1'b0;
    #1000;
    expect_true("write reset busy released", !wr_rst_busy);
    expect_true("read reset busy released", !rd_rst_busy);
    expect_true("empty after reset", rd_empty);
    expect_true("not full after reset", !wr_full && !rd_full);

    // (2) fill with the reader stopped
    wr_rate = 100;
    wr_stop = 1'b0;
    wait (wr_full);
    repeat (6) @(negedge wr_clk);
    wr_stop = 1'b1;
    repeat (4) @(negedge wr_clk);
    expect_true("full after DEPTH words", writes == DEPTH);
    expect_true("writes while full were dropped", dropped > 0);
    expect_true("read side sees full", rd_full);
    expect_true("not empty when full", !rd_empty);

    // (3) random traffic
    for (int phase = 0; phase < 6; phase++) begin
      wr_rate = int'($urandom_range(10, 100));
      rd_rate = int'($urandom_range(5, 100));
      wr_stop = 1'b0;
      rd_stop = 1'b0;
      #40000;
    end

    // (4) drain
    wr_stop = 1'b1;
    rd_rate = 100;
    #5000;
    expect_true("all writes read back", ref_q.size() == 0);
    expect_true("empty at the end", rd_empty);
    expect_true("not full at the end", !wr_full && !rd_full);
    expect_true("traffic happened", reads > 1000);
    $display("async_fifo_tb: %0d words written, %0d slices read", writes, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
