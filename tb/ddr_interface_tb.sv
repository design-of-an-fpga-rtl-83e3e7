// ddr_interface_tb: self-checking test of the DDR capture stage.
//
// The test plays the ADC: for every sample it puts the even bits (D0, D2,
// ... D14) on the eight lanes for the falling edge and the odd bits (D1,
// ... D15) for the following rising edge, and then checks that the 16-bit
// sample appears on the next falling edge, not earlier, with every bit in
// its place. Sample values are random. Reset must clear the output.
module ddr_interface_tb;
  import fsi_daq_pkg::*;

  logic        ad_clk = 1'b0;
  logic        rst;
  logic [7:0]  ddr_data;
  sample_t     sample;
  int unsigned checks = 0, failures = 0;

  ddr_interface dut (.ad_clk, .rst, .ddr_data, .sample);

  always #5 ad_clk = ~ad_clk;

  function automatic logic [7:0] even_bits(sample_t s);
    for (int j = 0; j < 8; j++) even_bits[j] = s[2*j];
  endfunction
  function automatic logic [7:0] odd_bits(sample_t s);
    for (int j = 0; j < 8; j++) odd_bits[j] = s[2*j+1];
  endfunction

  task automatic check(string what, sample_t got, sample_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t s [0:199];

  initial begin
    ddr_data = '0;
    rst = 1'b1;
    repeat (3) @(posedge ad_clk);
    check("reset clears sample", sample, '0);
    #1 rst = 1'b0;
    s[0] = 16'hFFFF;          // all ones and alternating patterns first
    s[1] = 16'h0000;
    s[2] = 16'hAAAA;
    s[3] = 16'h5555;
    s[4] = 16'h8001;
    for (int n = 5; n < 200; n++) s[n] = sample_t'($urandom);
    for (int n = 0; n < 200; n++) begin
      @(posedge ad_clk) #1 ddr_data = even_bits(s[n]);
      // Before the falling edge the previous sample must still be there.
      if (n >= 2) check("sample held until falling edge", sample, s[n-2]);
      @(negedge ad_clk) #1;
      if (n >= 1) check("sample on falling edge", sample, s[n-1]);
      ddr_data = odd_bits(s[n]);
    end
    @(posedge ad_clk) #1;
    @(negedge ad_clk) #1 check("last sample", sample, s[199]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
