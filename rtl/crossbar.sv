// crossbar: behavioural model of the memristive crossbar. Cell (i, j) holds
// a conductance level g[i][j] of CELL_BITS bits; with wordline voltages
// row_v[i] the current collected on bitline j is the analog dot product
// sum_i row_v[i] * g[i][j], which is the in-situ matrix-vector product. The
// model is ideal (linear cells, no wire resistance, no noise); currents are
// reported as analog_t values already scaled to the ADC input (one
// conductance unit at V_READ = one LSB).
//
// Programming port: w_we writes level w_level into cell (w_row, w_col) at the
// clock edge. The cells are non-volatile and have no reset; program every
// cell that is read. The crossbar size and cell precision are this design's
// choices; the architecture gives neither.
module crossbar
  import adc_pkg::*;
#(
  parameter int unsigned ROWS      = 32,
  parameter int unsigned COLS      = 32,
  parameter int unsigned CELL_BITS = 1
) (
  input  logic                        clk,
  input  logic                        w_we,
  input  logic [$clog2(ROWS)-1:0]     w_row,
  input  logic [$clog2(COLS)-1:0]     w_col,
  input  logic [CELL_BITS-1:0]        w_level,
  input  analog_t                     row_v [ROWS],
  output analog_t                     bl    [COLS]
);
  logic [CELL_BITS-1:0] g [ROWS][COLS];

  always_ff @(posedge clk)
    if (w_we) g[w_row][w_col] <= w_level;

  always_comb
    for (int j = 0; j < COLS; j++) begin
      bl[j] = '0;
      for (int i = 0; i < ROWS; i++)
        bl[j] = bl[j] + row_v[i] * analog_t'(g[i][j]);
    end
endmodule
