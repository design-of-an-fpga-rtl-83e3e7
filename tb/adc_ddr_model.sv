// adc_ddr_model: behavioural model of the ADC's digital output, for
// testbenches only.
//
// On every period of the sampling clock the model emits the next 16-bit
// sample on eight DDR lanes: even bits (D0, D2, ... D14) while the clock is
// high, so they are valid at the falling edge, and odd bits (D1, ... D15)
// while it is low, valid at the next rising edge. Lane j carries D2j and
// D2j+1. The lanes change 1 time unit after each clock edge. Sample n has
// the value value_of(n) = n * 40503 + 17 (mod 2^16), which is distinct for
// 65536 consecutive samples and lets a test recover n from a value. `index`
// is the number of the sample currently on the lanes. Analog behaviour,
// conversion latency and the SPI configuration port are not modelled.
module adc_ddr_model (
  input  logic       ad_clk,
  output logic [7:0] data,
  output int         index
);

  function automatic logic [15:0] value_of(int n);
    return 16'(n * 40503 + 17);
  endfunction

  initial begin
    index = 0;
    data  = '0;
  end

  always @(posedge ad_clk) begin
    logic [15:0] v;
    #1;
    index = index + 1;
    v = value_of(index);
    for (int j = 0; j < 8; j++) data[j] = v[2*j];
  end

  always @(negedge ad_clk) begin
    logic [15:0] v;
    #1;
    v = value_of(index);
    for (int j = 0; j < 8; j++) data[j] = v[2*j+1];
  end

endmodule
