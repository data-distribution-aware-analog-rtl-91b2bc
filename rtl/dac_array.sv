// dac_array: behavioural model of the wordline DACs of a processing element.
// Each row receives one SW-bit slice of its input activation and drives the
// wordline with slice * V_READ while en is high, 0 otherwise. V_READ is set so
// that one unit of cell conductance at one unit of input adds one ADC LSB to
// the bitline; the ideal linear transfer is a modelling choice. The
// architecture shows one DAC per row feeding the crossbar; its resolution is
// this design's parameter SW (1 bit by default, so eight slices cover an
// 8-bit activation). Outputs are analog_t fixed-point voltages (adc_pkg).
module dac_array
  import adc_pkg::*;
#(
  parameter int unsigned ROWS   = 32,
  parameter int unsigned SW     = 1,
  parameter analog_t     V_READ = ANA_LSB
) (
  input  logic                    en,
  input  logic [ROWS-1:0][SW-1:0] codes,
  output analog_t                 row_v [ROWS]
);
  always_comb
    for (int i = 0; i < ROWS; i++)
      row_v[i] = en ? analog_t'(codes[i]) * V_READ : '0;
endmodule
