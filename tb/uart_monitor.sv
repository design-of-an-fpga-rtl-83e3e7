// uart_monitor: serial-line decoder for testbenches. Watches an 8N1 line
// with a bit time of CLKS_PER_BIT cycles of clk, samples each bit in its
// middle and pulses `valid` for one cycle with the byte when a frame with a
// good stop bit ends. `frame_error` pulses instead when the stop bit is 0.
module uart_monitor #(
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic       clk,
  input  logic       line,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_error
);

  initial begin
    valid = 1'b0;
    frame_error = 1'b0;
    data = '0;
  end

  always begin
    @(negedge line);
    repeat (CLKS_PER_BIT / 2) @(posedge clk);
    if (line == 1'b0) begin
      logic [7:0] b;
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        b[i] = line;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      if (line) begin
        data  <= b;
        valid <= 1'b1;
      end else begin
        frame_error <= 1'b1;
      end
      @(posedge clk);
      valid       <= 1'b0;
      frame_error <= 1'b0;
    end
  end

endmodule
