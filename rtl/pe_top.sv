// pe_top: a memristive in-situ processing element whose single, shared
// SAR-ADC uses the data distribution-aware conversion strategy.
//
// The crossbar multiplies an input vector (one IN_BITS-bit activation per
// row) with the conductance matrix programmed into it. Inputs are applied
// one SW-bit slice at a time through the DACs; for each slice every bitline
// is sampled and then converted, column after column, by the reconfigurable
// SAR-ADC, and the shift-and-add unit accumulates the codes into the output
// buffer with weight 2^(s*SW). Because the distribution of bitline outputs
// depends on the slice, the ADC's switch counter gives the first C_0 slices
// of every vector the CMN parameter set and the next C_1 slices the CMB set.
//
// Parts: pe_input_buffer, dac_array, crossbar, sample_hold, analog_mux,
// reconfig_sar_adc, shift_add, pe_output_buffer and the sequencer pe_ctrl.
// The DACs, crossbar, sample-and-hold, MUX, CDAC and comparator are
// behavioural models of analog circuits; the rest is synthesizable.
// The part list and the ADC follow the architecture; the sizes (32 x 32
// crossbar of 1-bit cells, 1-bit DACs, 8-bit inputs) and the schedule are
// this design's choices, and the ADC resolution R = 5 is the resolution used
// in the conversion examples. Column results saturate at 2^R - 1 per slice.
//
// Use: program the cells (w_*), write the inputs (in_*), optionally load the
// ADC registers (cfg_*), pulse start while busy = 0; done pulses when every
// out_data word (read combinationally at out_addr) holds
// sum_s min(bitline_j(s), 2^R - 1) * 2^(s*SW). See pe_ctrl for the timing.
module pe_top
  import adc_pkg::*;
#(
  parameter int unsigned ROWS      = 32,
  parameter int unsigned COLS      = 32,
  parameter int unsigned CELL_BITS = 1,
  parameter int unsigned IN_BITS   = 8,
  parameter int unsigned SW        = 1,
  parameter int unsigned R         = 5,
  localparam int unsigned NSLICE   = IN_BITS / SW,
  localparam int unsigned OW       = R + IN_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input vector
  input  logic                     in_we,
  input  logic [$clog2(ROWS)-1:0]  in_addr,
  input  logic [IN_BITS-1:0]       in_data,
  // crossbar programming
  input  logic                     w_we,
  input  logic [$clog2(ROWS)-1:0]  w_row,
  input  logic [$clog2(COLS)-1:0]  w_col,
  input  logic [CELL_BITS-1:0]     w_level,
  // ADC configuration registers
  input  logic                     cfg_we,
  input  logic [2:0]               cfg_addr,
  input  logic [CFG_W-1:0]         cfg_wdata,
  output logic [CFG_W-1:0]         cfg_rdata,
  // operation
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // results
  input  logic [$clog2(COLS)-1:0]  out_addr,
  output logic [OW-1:0]            out_data,
  // statistics of the last product
  output logic [31:0]              stat_steps,
  output logic [31:0]              stat_cmn_convs,
  output logic [31:0]              stat_cmb_convs,
  // conversion method selected for the current slice (S_switch)
  output method_e                  adc_mode
);

  logic [$clog2(NSLICE+1)-1:0] slice;
  logic [ROWS-1:0][SW-1:0]     codes;
  analog_t                     row_v [ROWS];
  analog_t                     bl    [COLS];
  analog_t                     held  [COLS];
  analog_t                     v_in;
  logic                        dac_en, sh_sample, obuf_clear, sa_valid;
  logic [$clog2(COLS)-1:0]     col;
  logic                        adc_start, adc_slice_clear, adc_slice_done;
  logic                        adc_done;
  logic [R-1:0]                adc_dout;
  logic [$clog2(R+1)+1:0]      adc_steps;
  method_e                     adc_method;
  logic [OW-1:0]               acc_out, wr_data;
  logic                        wr_en;
  logic [$clog2(COLS)-1:0]     wr_col;

  pe_input_buffer #(.ROWS(ROWS), .IN_BITS(IN_BITS), .SW(SW)) u_ibuf (
    .clk, .rst_n, .we(in_we), .waddr(in_addr), .wdata(in_data), .slice, .codes
  );

  dac_array #(.ROWS(ROWS), .SW(SW)) u_dac (.en(dac_en), .codes, .row_v);

  crossbar #(.ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS)) u_xbar (
    .clk, .w_we, .w_row, .w_col, .w_level, .row_v, .bl
  );

  sample_hold #(.COLS(COLS)) u_sh (.clk, .rst_n, .sample(sh_sample), .bl, .held);

  analog_mux #(.COLS(COLS)) u_mux (.sel(col), .in(held), .out(v_in));

  reconfig_sar_adc #(.R(R)) u_adc (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .slice_clear(adc_slice_clear), .slice_done(adc_slice_done), .s_switch(adc_mode), .switch_cnt(),
    .start(adc_start), .v_in, .busy(), .done(adc_done), .dout(adc_dout),
    .steps(adc_steps), .method(adc_method)
  );

  shift_add #(.R(R), .COLS(COLS), .IN_BITS(IN_BITS), .SW(SW)) u_sa (
    .clk, .rst_n, .valid(sa_valid), .col, .slice, .value(adc_dout), .acc_in(acc_out),
    .wr_en, .wr_col, .wr_data
  );

  pe_output_buffer #(.COLS(COLS), .OW(OW)) u_obuf (
    .clk, .rst_n, .clear(obuf_clear), .wr_en, .wr_col, .wr_data,
    .acc_col(col), .acc_out, .rd_addr(out_addr), .rd_data(out_data)
  );

  pe_ctrl #(.R(R), .COLS(COLS), .NSLICE(NSLICE)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .slice, .dac_en, .sh_sample, .col, .obuf_clear, .sa_valid,
    .adc_start, .adc_slice_clear, .adc_slice_done, .adc_done, .adc_steps,
    .adc_method, .stat_steps, .stat_cmn_convs, .stat_cmb_convs
  );

endmodule
