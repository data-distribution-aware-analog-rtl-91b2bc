// reconfig_sar_adc: the reconfigurable SAR-ADC. A conventional SAR-ADC
// resolves every bit of every sample by binary search. This one exploits the
// shape of the bitline-output distribution instead: for biased outputs (most
// high-order bits zero) it predicts those bits zero and only falls back when
// the prediction fails (CMB); for normal-shaped outputs it starts just below
// the distribution peak and walks down from there (CMN). A switch counter
// picks the method and parameter set per input slice: C_0 slices with the
// CMN set, then C_1 slices with the CMB set, repeating.
//
// Structure, as in the architecture: configurable registers with the
// parameter MUX (adc_cfg_regs), switch counter (switch_counter), SAR logic
// (sar_logic), CDAC (cdac) and comparator (comparator). The CDAC and the
// comparator are behavioural models; V_in comes from the sample-and-hold and
// must stay stable during a conversion.
//
// Interface and timing: start (while busy = 0, or in the cycle done is high)
// begins a conversion with the parameter set selected at that moment. One
// comparison per clock; done pulses k cycles after the start edge, where k =
// steps is the number of comparisons made. dout is clamped to 2^R - 1 for
// inputs at or above full scale. slice_done advances the switch counter at
// the end of an input slice and slice_clear restarts its pattern; s_switch
// and switch_cnt show the set in force and the position in its period. The
// configuration port is a plain synchronous write / combinational read port
// (register map in adc_cfg_regs); writes are meant to happen between
// conversions.
module reconfig_sar_adc
  import adc_pkg::*;
#(
  parameter int unsigned R = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration port
  input  logic                   cfg_we,
  input  logic [2:0]             cfg_addr,
  input  logic [CFG_W-1:0]       cfg_wdata,
  output logic [CFG_W-1:0]       cfg_rdata,
  // switching
  input  logic                   slice_clear,
  input  logic                   slice_done,
  output method_e                s_switch,
  output logic [CNT_W-1:0]       switch_cnt,
  // conversion
  input  logic                   start,
  input  analog_t                v_in,
  output logic                   busy,
  output logic                   done,
  output logic [R-1:0]           dout,
  output logic [$clog2(R+1)+1:0] steps,
  output method_e                method
);

  logic [CNT_W-1:0] rc0, rc1;
  conv_params_t     params;
  logic [R-1:0]     s_ref;
  analog_t          v_ref;
  logic             s_comp;

  adc_cfg_regs u_regs (
    .clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata),
    .sel(s_switch), .rc0, .rc1, .params
  );

  switch_counter u_switch (
    .clk, .rst_n, .clear(slice_clear), .slice_done, .rc0, .rc1, .sel(s_switch), .cnt(switch_cnt)
  );

  sar_logic #(.R(R)) u_sar (
    .clk, .rst_n, .start, .params, .s_comp, .s_ref, .busy, .done, .dout, .steps, .method
  );

  cdac #(.R(R)) u_cdac (.s_ref, .v_ref);

  comparator u_cmp (.v_in, .v_ref, .s_comp);

  // The parameter set must not change under a running conversion.
  a_no_cfg_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !cfg_we);

endmodule
