// shift_add: shift-and-add unit behind the ADC. The crossbar sees one SW-bit
// slice of the input at a time, so the result for slice s carries weight
// 2^(s*SW). For every ADC result (valid) this unit reads the running sum of
// that column (acc_in, from the output buffer) and writes back
// acc_in + (value << s*SW) one clock later (wr_en, wr_col, wr_data).
// The architecture names the unit; the read-modify-write organisation with
// the output buffer and the one-cycle latency are this design's choices.
module shift_add #(
  parameter int unsigned R       = 5,
  parameter int unsigned COLS    = 32,
  parameter int unsigned IN_BITS = 8,
  parameter int unsigned SW      = 1,
  localparam int unsigned NSLICE = IN_BITS / SW,
  localparam int unsigned OW     = R + IN_BITS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        valid,
  input  logic [$clog2(COLS)-1:0]     col,
  input  logic [$clog2(NSLICE+1)-1:0] slice,
  input  logic [R-1:0]                value,
  input  logic [OW-1:0]               acc_in,
  output logic                        wr_en,
  output logic [$clog2(COLS)-1:0]     wr_col,
  output logic [OW-1:0]               wr_data
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_en   <= 1'b0;
      wr_col  <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= valid;
      if (valid) begin
        wr_col  <= col;
        wr_data <= acc_in + (OW'(value) << (int'(slice) * SW));
      end
    end
endmodule
