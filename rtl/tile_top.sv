// tile_top: a tile of the in-situ accelerator, built from NPE processing
// elements (pe_top), each with its own crossbar and its own reconfigurable,
// distribution-aware SAR-ADC, an adder tree and tile input/output buffers.
//
// The tile computes y = W x for an input vector x of NPE * ROWS activations
// and a weight matrix of NPE * ROWS rows and COLS columns: PE p holds rows
// p*ROWS .. p*ROWS+ROWS-1 of W and receives the matching part of x. Each PE
// produces partial column sums; the adder tree adds the NPE partial sums of
// every column. Each PE's ADC has its own configuration registers, since the
// bitline statistics, and so the best conversion parameters, differ from
// crossbar to crossbar.
//
// Interface: write x through in_* into the tile input buffer, program cells
// through w_* (w_pe picks the PE), load ADC registers through cfg_* (cfg_pe
// picks the PE; cfg_rdata reads the selected PE), pulse start while
// busy = 0. done pulses once out_data (read combinationally at out_addr)
// holds the COLS results. stat_steps is the number of ADC comparisons all
// PEs spent on the last operation. Timing: NPE * ROWS load cycles, the
// slowest PE's run time (see pe_ctrl), then COLS + 3 cycles.
//
// The architecture draws PEs, an adder tree, activation and pooling units and
// input/output buffers in a tile. Activation and pooling are not included:
// their functions are not specified. NPE = 8 follows the number of PE boxes
// drawn; the data mapping and schedule are this design's choices.
module tile_top
  import adc_pkg::*;
#(
  parameter int unsigned NPE       = 8,
  parameter int unsigned ROWS      = 32,
  parameter int unsigned COLS      = 32,
  parameter int unsigned CELL_BITS = 1,
  parameter int unsigned IN_BITS   = 8,
  parameter int unsigned SW        = 1,
  parameter int unsigned R         = 5,
  localparam int unsigned OW       = R + IN_BITS,
  localparam int unsigned TW       = OW + $clog2(NPE)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // input vector
  input  logic                         in_we,
  input  logic [$clog2(NPE*ROWS)-1:0]  in_addr,
  input  logic [IN_BITS-1:0]           in_data,
  // crossbar programming
  input  logic                         w_we,
  input  logic [$clog2(NPE)-1:0]       w_pe,
  input  logic [$clog2(ROWS)-1:0]      w_row,
  input  logic [$clog2(COLS)-1:0]      w_col,
  input  logic [CELL_BITS-1:0]         w_level,
  // ADC configuration registers of one PE
  input  logic                         cfg_we,
  input  logic [$clog2(NPE)-1:0]       cfg_pe,
  input  logic [2:0]                   cfg_addr,
  input  logic [CFG_W-1:0]             cfg_wdata,
  output logic [CFG_W-1:0]             cfg_rdata,
  // operation
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // results
  input  logic [$clog2(COLS)-1:0]      out_addr,
  output logic [TW-1:0]                out_data,
  output logic [31:0]                  stat_steps
);

  logic [$clog2(NPE*ROWS)-1:0] tib_raddr;
  logic [IN_BITS-1:0]          tib_rdata;
  logic [NPE-1:0]              pe_in_we, pe_done;
  logic [$clog2(ROWS)-1:0]     pe_in_addr;
  logic                        pe_start;
  logic [$clog2(COLS)-1:0]     pe_out_addr, tob_waddr;
  logic [OW-1:0]               pe_out [NPE];
  logic [CFG_W-1:0]            pe_cfg_rdata [NPE];
  logic [31:0]                 pe_steps [NPE];
  logic                        at_valid, at_out_valid, tob_we;
  logic [TW-1:0]               at_out;

  tile_buffer #(.DEPTH(NPE*ROWS), .W(IN_BITS)) u_tib (
    .clk, .rst_n, .we(in_we), .waddr(in_addr), .wdata(in_data),
    .raddr(tib_raddr), .rdata(tib_rdata)
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe_top #(.ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS), .IN_BITS(IN_BITS),
             .SW(SW), .R(R)) u_pe (
      .clk, .rst_n,
      .in_we(pe_in_we[p]), .in_addr(pe_in_addr), .in_data(tib_rdata),
      .w_we(w_we && (int'(w_pe) == p)), .w_row, .w_col, .w_level,
      .cfg_we(cfg_we && (int'(cfg_pe) == p)), .cfg_addr, .cfg_wdata,
      .cfg_rdata(pe_cfg_rdata[p]),
      .start(pe_start), .busy(), .done(pe_done[p]),
      .out_addr(pe_out_addr), .out_data(pe_out[p]),
      .stat_steps(pe_steps[p]), .stat_cmn_convs(), .stat_cmb_convs(), .adc_mode()
    );
  end

  always_comb begin
    cfg_rdata  = '0;
    stat_steps = '0;
    for (int p = 0; p < NPE; p++) begin
      if (int'(cfg_pe) == p) cfg_rdata = pe_cfg_rdata[p];
      stat_steps = stat_steps + pe_steps[p];
    end
  end

  tile_adder_tree #(.N(NPE), .W(OW)) u_tree (
    .clk, .rst_n, .in_valid(at_valid), .in(pe_out), .out_valid(at_out_valid), .out(at_out)
  );

  tile_buffer #(.DEPTH(COLS), .W(TW)) u_tob (
    .clk, .rst_n, .we(tob_we), .waddr(tob_waddr), .wdata(at_out),
    .raddr(out_addr), .rdata(out_data)
  );

  tile_ctrl #(.NPE(NPE), .ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .tib_raddr, .pe_in_we, .pe_in_addr, .pe_start, .pe_done, .pe_out_addr,
    .at_valid, .at_out_valid, .tob_we, .tob_waddr
  );

endmodule
