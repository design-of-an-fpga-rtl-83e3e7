// trigger_sync_tb: self-checking test of the trigger synchronizer and edge
// detector. The trigger is changed at random times (held at least one clock
// period). A reference model in the test delays the pin by STAGES+1 clock
// edges; tf must pulse exactly when that delayed copy falls, tr when it
// rises, each for one cycle, and `level` must follow the delayed copy.
module trigger_sync_tb;

  localparam int unsigned STAGES = 4;

  logic        clk = 1'b0;
  logic        rst, trigger;
  logic        level, tf, tr;
  int unsigned checks = 0, failures = 0;
  int unsigned n_tf = 0, n_tr = 0;

  trigger_sync #(.STAGES(STAGES)) dut (.clk, .rst, .trigger, .level, .tf, .tr);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the pin as sampled on each rising edge, kept for STAGES+2 edges.
  logic hist [STAGES+2];
  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES + 2; i++) hist[i] <= 1'b1;
    end else begin
      hist[0] <= trigger;
      for (int i = 1; i < STAGES + 2; i++) hist[i] <= hist[i-1];
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      logic exp_tf, exp_tr;
      // hist[STAGES-1] is the synchronizer output, hist[STAGES] the extra register.
      exp_tf = hist[STAGES] && !hist[STAGES-1];
      exp_tr = !hist[STAGES] && hist[STAGES-1];
      checks += 3;
      if (tf !== exp_tf) begin failures++; $display("FAIL tf at %0t", $time); end
      if (tr !== exp_tr) begin failures++; $display("FAIL tr at %0t", $time); end
      if (level !== hist[STAGES]) begin failures++; $display("FAIL level at %0t", $time); end
      if (tf) n_tf++;
      if (tr) n_tr++;
    end
  end

  initial begin
    rst = 1'b1;
    trigger = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // No edge may come out of reset with the trigger idle.
    repeat (10) @(negedge clk);
    checks++;
    if (n_tf != 0 || n_tr != 0) begin failures++; $display("FAIL edge after reset"); end
    for (int i = 0; i < 300; i++) begin
      repeat (int'($urandom_range(1, 20))) @(negedge clk);
      #2;
      trigger = ~trigger;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_tf < 100 || n_tr < 100) begin failures++; $display("FAIL too few edges seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
