// tile_ctrl: sequencer of a tile. One tile operation is
//   LOAD   copy the activations from the tile input buffer into the input
//          buffers of the PEs, one word per cycle (PE p gets words
//          p*ROWS .. p*ROWS+ROWS-1), NPE * ROWS cycles;
//   RUN    start all PEs together (one cycle);
//   WAIT   wait until every PE has reported done. The PEs finish at
//          different times, because their ADCs spend a data-dependent number
//          of comparisons;
//   REDUCE present column c to every PE's result port and to the adder tree,
//          c = 0 .. COLS-1, one per cycle; the registered tree output is
//          written into the tile output buffer one cycle later;
//   DRAIN  one cycle for the last write, then done pulses.
// The schedule is this design's choice; the architecture only shows the
// tile's parts.
module tile_ctrl #(
  parameter int unsigned NPE  = 8,
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // tile input buffer -> PE input buffers
  output logic [$clog2(NPE*ROWS)-1:0]   tib_raddr,
  output logic [NPE-1:0]                pe_in_we,
  output logic [$clog2(ROWS)-1:0]       pe_in_addr,
  // PEs
  output logic                          pe_start,
  input  logic [NPE-1:0]                pe_done,
  output logic [$clog2(COLS)-1:0]       pe_out_addr,
  // adder tree and tile output buffer
  output logic                          at_valid,
  input  logic                          at_out_valid,
  output logic                          tob_we,
  output logic [$clog2(COLS)-1:0]       tob_waddr
);

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_RUN, T_WAIT, T_REDUCE, T_DRAIN} tstate_e;
  tstate_e state;

  logic [$clog2(NPE+1)-1:0] p;       // PE being loaded
  logic [$clog2(ROWS)-1:0]  r;       // row being loaded
  logic [$clog2(COLS)-1:0]  c, c_d;  // column being reduced / written
  logic [NPE-1:0]           seen;    // PEs that have finished

  localparam logic [$clog2(ROWS)-1:0] LAST_ROW = ($clog2(ROWS))'(ROWS - 1);
  localparam logic [$clog2(COLS)-1:0] LAST_COL = ($clog2(COLS))'(COLS - 1);
  localparam logic [$clog2(NPE+1)-1:0] LAST_PE = ($clog2(NPE+1))'(NPE - 1);

  always_comb begin
    busy        = (state != T_IDLE);
    tib_raddr   = ($clog2(NPE*ROWS))'(int'(p) * ROWS + int'(r));
    pe_in_addr  = r;
    for (int k = 0; k < NPE; k++) pe_in_we[k] = (state == T_LOAD) && (int'(p) == k);
    pe_start    = (state == T_RUN);
    pe_out_addr = c;
    at_valid    = (state == T_REDUCE);
    tob_we      = at_out_valid;
    tob_waddr   = c_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      p     <= '0;
      r     <= '0;
      c     <= '0;
      c_d   <= '0;
      seen  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      c_d  <= c;
      unique case (state)
        T_IDLE:
          if (start) begin
            state <= T_LOAD;
            p     <= '0;
            r     <= '0;
          end
        T_LOAD:
          if (r == LAST_ROW) begin
            r <= '0;
            if (p == LAST_PE) state <= T_RUN;
            else              p <= p + 1'b1;
          end else begin
            r <= r + 1'b1;
          end
        T_RUN: begin
          state <= T_WAIT;
          seen  <= '0;
        end
        T_WAIT: begin
          seen <= seen | pe_done;
          if (&(seen | pe_done)) begin
            state <= T_REDUCE;
            c     <= '0;
          end
        end
        T_REDUCE:
          if (c == LAST_COL) state <= T_DRAIN;
          else               c <= c + 1'b1;
        T_DRAIN: begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
