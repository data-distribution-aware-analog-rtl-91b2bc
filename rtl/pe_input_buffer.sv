// pe_input_buffer: input buffer of a processing element. It stores one
// IN_BITS-bit activation per crossbar row and presents slice number `slice`
// of all of them at once to the DACs: bits [slice*SW +: SW] of each entry.
// Slice 0 holds the least significant bits (this design's order).
//
// Interface: synchronous write (we, waddr, wdata); the slice output is
// combinational from the stored words and `slice`. Entries reset to 0.
module pe_input_buffer #(
  parameter int unsigned ROWS    = 32,
  parameter int unsigned IN_BITS = 8,
  parameter int unsigned SW      = 1,
  localparam int unsigned NSLICE = IN_BITS / SW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we,
  input  logic [$clog2(ROWS)-1:0]     waddr,
  input  logic [IN_BITS-1:0]          wdata,
  input  logic [$clog2(NSLICE+1)-1:0] slice,
  output logic [ROWS-1:0][SW-1:0]     codes
);
  logic [IN_BITS-1:0] mem [ROWS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mem <= '{default: '0};
    else if (we) mem[waddr] <= wdata;

  always_comb
    for (int i = 0; i < ROWS; i++)
      codes[i] = SW'(mem[i] >> (int'(slice) * SW));
endmodule
