// byte_mux: picks the byte of a 16-bit sample that the UART sends next.
//
// The FIFO delivers 16-bit samples but the UART moves one byte at a time, so
// each sample goes out as two characters, high byte (bits 15:8) first and low
// byte (bits 7:0) second. The controller drives `sel` (SEL_HB or SEL_LB) for
// the duration of each send state. Purely combinational.
module byte_mux
  import fsi_daq_pkg::*;
(
  input  sample_t   din,
  input  byte_sel_e sel,
  output byte_t     dout
);

  always_comb begin
    unique case (sel)
      SEL_HB:  dout = din[SAMPLE_W-1:BYTE_W];
      SEL_LB:  dout = din[BYTE_W-1:0];
      default: dout = din[BYTE_W-1:0];
    endcase
  end

endmodule
