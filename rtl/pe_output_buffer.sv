// pe_output_buffer: output buffer of a processing element, one OW-bit word
// per crossbar column. It is the accumulator storage of the shift-and-add
// unit (read port acc_col/acc_out, write port wr_*) and the place results are
// read from (rd_addr/rd_data). clear zeroes every word at the clock edge and
// takes priority over a write. Reads are combinational. Sizes and ports are
// this design's choices; the architecture only names the buffer.
module pe_output_buffer #(
  parameter int unsigned COLS = 32,
  parameter int unsigned OW   = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    wr_en,
  input  logic [$clog2(COLS)-1:0] wr_col,
  input  logic [OW-1:0]           wr_data,
  input  logic [$clog2(COLS)-1:0] acc_col,
  output logic [OW-1:0]           acc_out,
  input  logic [$clog2(COLS)-1:0] rd_addr,
  output logic [OW-1:0]           rd_data
);
  logic [OW-1:0] mem [COLS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      mem <= '{default: '0};
    else if (clear)  mem <= '{default: '0};
    else if (wr_en)  mem[wr_col] <= wr_data;

  assign acc_out = mem[acc_col];
  assign rd_data = mem[rd_addr];
endmodule
