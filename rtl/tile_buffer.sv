// tile_buffer: a simple word buffer of the tile, used both as its input
// buffer (activations of all PEs' rows) and as its output buffer (column
// results after the adder tree). One synchronous write port, one
// combinational read port; contents reset to 0. Depth and width are set by
// the instance. The architecture names the tile's input and output buffers;
// their organisation is this design's choice.
module tile_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mem <= '{default: '0};
    else if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
