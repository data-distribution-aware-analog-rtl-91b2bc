// analog_mux: behavioural model of the column multiplexer that connects one
// held bitline to the single ADC of the processing element. sel picks the
// column; a value of sel beyond the last column gives 0 V.
module analog_mux
  import adc_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  logic [$clog2(COLS)-1:0] sel,
  input  analog_t                 in [COLS],
  output analog_t                 out
);
  always_comb begin
    out = '0;
    for (int j = 0; j < COLS; j++)
      if (int'(sel) == j) out = in[j];
  end
endmodule
