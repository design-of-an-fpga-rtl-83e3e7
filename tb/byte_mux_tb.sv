// byte_mux_tb: self-checking test of the UART byte multiplexer. Random
// 16-bit words are applied with each select value; the high select must
// return bits 15:8 and the low select bits 7:0.
module byte_mux_tb;
  import fsi_daq_pkg::*;

  sample_t     din;
  byte_sel_e   sel;
  byte_t       dout;
  int unsigned checks = 0, failures = 0;

  byte_mux dut (.din, .sel, .dout);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      din = sample_t'($urandom);
      sel = SEL_HB;
      #1;
      checks++;
      if (dout !== byte_t'(din / 256)) begin
        failures++;
        $display("FAIL HB: din=%h dout=%h", din, dout);
      end
      sel = SEL_LB;
      #1;
      checks++;
      if (dout !== byte_t'(din % 256)) begin
        failures++;
        $display("FAIL LB: din=%h dout=%h", din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
