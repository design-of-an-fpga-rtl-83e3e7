// joint_numbers_tb: self-checking test of the four-sample packer.
//
// A new, distinct sample value is applied for every rising AD CLK edge, and
// `enable` is switched on and off in windows of random length. The test
// records which samples were taken while enabled and checks that
//   - wr_clk is AD CLK divided by four,
//   - every valid word holds four consecutive samples of one window, the
//     oldest in bits 63:48 and the newest in bits 15:0,
//   - the words of a window follow each other with no gap or overlap, and
//     at most three samples are lost at either end of the window,
//   - no valid word appears while the chain is cleared.
module joint_numbers_tb;
  import fsi_daq_pkg::*;

  logic        ad_clk = 1'b0;
  logic        rst, enable;
  sample_t     din;
  logic        wr_clk, word_valid;
  word_t       word;
  int unsigned checks = 0, failures = 0;

  joint_numbers dut (.ad_clk, .rst, .enable, .din, .wr_clk, .word, .word_valid);

  always #5 ad_clk = ~ad_clk;

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t value_of(int n);
    return sample_t'(n * 40503 + 17);   // distinct for n < 65536
  endfunction

  // Samples taken in the current window, in order.
  sample_t     win [$];
  int          next_pos;     // window position expected for the next word's oldest sample
  int          first_pos;
  int unsigned words_in_win;
  int unsigned total_words = 0;

  // Divider check: four AD CLK rising edges per wr_clk rising edge.
  int unsigned ad_edges = 0;
  int unsigned wr_edges = 0;
  always @(posedge ad_clk) ad_edges++;
  always @(posedge wr_clk) begin
    if (!rst && wr_edges > 0) expect_true("wr_clk period is four AD CLK periods", ad_edges == 4);
    ad_edges = 0;
    wr_edges++;
  end

  // Word check at every write-clock edge.
  always @(posedge wr_clk) begin
    if (!rst && word_valid) begin
      sample_t got [4];
      int      pos;
      for (int i = 0; i < 4; i++) got[i] = word[(3-i)*16 +: 16];  // got[0] oldest
      pos = -1;
      for (int k = 0; k < win.size(); k++) if (win[k] == got[0]) pos = k;
      expect_true("oldest sample belongs to the window", pos >= 0);
      if (pos >= 0) begin
        if (words_in_win == 0) begin
          first_pos = pos;
          expect_true("at most three samples lost at window start", pos <= 3);
        end else begin
          expect_true("words are contiguous", pos == next_pos);
        end
        for (int i = 1; i < 4; i++)
          expect_true("samples consecutive and ordered oldest-first",
                      pos + i < win.size() && win[pos+i] == got[i]);
        next_pos = pos + 4;
        words_in_win++;
        total_words++;
      end
    end
  end

  int n = 0;
  int unsigned idle_valid = 0;

  initial begin
    rst = 1'b1;
    enable = 1'b0;
    din = '0;
    repeat (4) @(posedge ad_clk);
    @(negedge ad_clk) rst = 1'b0;
    for (int w = 0; w < 60; w++) begin
      int len;
      len = 3 + int'($urandom_range(0, 40));
      win.delete();
      words_in_win = 0;
      next_pos = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge ad_clk);
        enable = 1'b1;
        din = value_of(n);
        win.push_back(din);
        n++;
      end
      @(negedge ad_clk);
      enable = 1'b0;
      din = value_of(n);
      n++;
      // Let the last word reach the output, then watch the idle chain.
      repeat (8) @(negedge ad_clk);
      if (words_in_win == 0)
        expect_true("short window yields no word only if shorter than 7", len < 7);
      else
        expect_true("at most three samples lost at window end",
                    len - next_pos <= 3);
      repeat (int'($urandom_range(0, 6))) begin
        @(posedge wr_clk) #1;
        if (word_valid) idle_valid++;
      end
    end
    expect_true("no valid word while disabled", idle_valid == 0);
    expect_true("words were produced", total_words > 100);
    $display("joint_numbers_tb: %0d words checked", total_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
