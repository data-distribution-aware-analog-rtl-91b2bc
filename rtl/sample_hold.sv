// sample_hold: behavioural model of the per-bitline sample-and-hold stages.
// On a clock edge with sample = 1 every bitline value is captured; the held
// values stay constant until the next sample, so the ADC, shared by all
// columns, can convert them one after another while the crossbar moves on.
// Ideal hold (no droop). Values are analog_t fixed-point (adc_pkg).
module sample_hold
  import adc_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample,
  input  analog_t bl   [COLS],
  output analog_t held [COLS]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      held <= '{default: '0};
    else if (sample) held <= bl;
endmodule
