// tile_adder_tree: adds the column results of all N processing elements of a
// tile. The N inputs are summed pairwise, level by level (a balanced binary
// tree of ceil(log2 N) adder levels), and the sum is registered: out is valid
// one clock after in_valid, flagged by out_valid. The output is W + log2(N)
// bits wide, so it cannot overflow. The architecture names an adder tree in
// the tile; what it adds (same-column results of PEs that hold different
// input rows of one layer) and its single pipeline stage are this design's
// reading.
module tile_adder_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 13,
  localparam int unsigned OW = W + $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      in [N],
  output logic              out_valid,
  output logic [OW-1:0]     out
);
  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned P2     = 1 << LEVELS;

  // node[level][k]: level 0 holds the (zero-padded) inputs.
  logic [OW-1:0] node [LEVELS+1][P2];
  logic [OW-1:0] sum;

  always_comb begin
    for (int k = 0; k < P2; k++)
      node[0][k] = (k < N) ? OW'(in[k]) : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int k = 0; k < P2; k++)
        node[l][k] = (k < (P2 >> l)) ? node[l-1][2*k] + node[l-1][2*k+1] : '0;
    sum = node[LEVELS][0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= sum;
    end
endmodule
