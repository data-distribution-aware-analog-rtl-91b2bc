// sar_logic: control of the reconfigurable SAR-ADC. It produces the reference
// code S_ref for the CDAC every clock, reads back the comparator decision
// S_comp and narrows the interval that holds the input until one code is left.
//
// How it works. The unit keeps two bounds, lo (input code >= lo) and hi
// (input code < hi). Every comparison of the input with a reference s moves
// one of them: S_comp = 1 (V_in >= V_ref) sets lo = s, otherwise hi = s. The
// three conversion methods only differ in which references they try:
//   * CMB (biased outputs): predict the top N_start bits zero and try
//     s = 2^(R-1-N_start). If the input is below it the prediction holds.
//     Otherwise N_start is rolled back by N_step (not below 0) and the next
//     power of two is tried, until a prediction holds or N_start = 0 failed.
//   * CMN (normal outputs): try s = 2^(R-1-N_start) - 2^N_off, just below
//     the distribution peak. If the input is below it, N_off grows by N_step
//     and the next, lower, reference is tried until the input lies between
//     two successive references (or the reference would reach zero). If the
//     first try already finds the input above it, CMN falls back to CMB with
//     the same N_start and N_step.
//   * Binary search: the bits where lo and hi-1 agree are known; the next
//     reference sets the highest bit where they differ. Bits implied by the
//     bounds are never compared, so after a failed CMB prediction with
//     N_step = 1 the bit just below the successful prediction is 1 for free.
// The prediction rules and S_ref formulas follow the architecture; the
// interval formulation, the handling of out-of-range settings (N_start
// clamped to R-1, N_step = 0 taken as 1, a CMN start at or below zero run as
// CMB) and the stop rule of the CMN offset search are this design's choices.
//
// Interface and timing. start is taken only while idle (busy = 0) and latches
// the parameter set. One comparison is made per clock: S_ref is valid in the
// cycle after start and in each following cycle until the conversion ends;
// s_comp must be valid, combinationally from s_ref, in the same cycle. After
// the k-th comparison done pulses for one cycle with dout (the code), steps
// (= k, the number of comparisons, i.e. conversion steps) and method. dout,
// steps and method hold until the next done. start may be asserted in the
// cycle done is high, so back-to-back conversions take k + 1 cycles each.
module sar_logic
  import adc_pkg::*;
#(
  parameter int unsigned R = 5  // ADC resolution in bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  conv_params_t          params,
  input  logic                  s_comp,   // 1: V_in >= V_ref
  output logic [R-1:0]          s_ref,
  output logic                  busy,
  output logic                  done,
  output logic [R-1:0]          dout,
  output logic [$clog2(R+1)+1:0] steps,
  output method_e               method
);

  localparam int unsigned BW = R + 1;          // bounds go up to 2^R
  localparam logic [BW-1:0] FULL = BW'(1) << R;

  sar_phase_e        phase_q, phase_n;
  logic [BW-1:0]     lo_q, lo_n, hi_q, hi_n;
  logic [PW-1:0]     ns_q, ns_n;   // current N_start
  logic [PW-1:0]     off_q, off_n; // current N_off
  logic [PW-1:0]     stp_q;        // N_step in force
  logic              first_q, first_n;
  logic [$clog2(R+1)+1:0] cnt_q;
  logic [BW-1:0]     ref_w;        // reference tried this cycle
  logic [BW-1:0]     hi_m1, diff, bs_mask, bs_ref;
  logic              finish;

  // Start-time normalisation of the parameter set.
  logic [PW-1:0] nst_start, stp_start;
  logic          cmn_ok;
  always_comb begin
    nst_start = (params.nstart > PW'(R-1)) ? PW'(R-1) : params.nstart;
    stp_start = (params.nstep == '0) ? PW'(1) : params.nstep;
    cmn_ok    = (params.method == METHOD_CMN) &&
                ({1'b0, params.noff} < {1'b0, PW'(R-1)} - {1'b0, nst_start});
  end

  // Binary search reference: common prefix of lo and hi-1, then the highest
  // differing bit set and everything below it clear.
  always_comb begin
    hi_m1   = hi_q - BW'(1);
    diff    = lo_q ^ hi_m1;
    bs_mask = '0;                       // ones at and below the top set bit of diff
    for (int i = 0; i < BW; i++)     // last hit is the top bit
      if (diff[i]) bs_mask = (BW'(1) << i) | ((BW'(1) << i) - BW'(1));
    bs_ref  = (lo_q & ~bs_mask) | (bs_mask & ~(bs_mask >> 1));
  end

  always_comb begin
    unique case (phase_q)
      PH_CMB:  ref_w = BW'(1) << (R-1-int'(ns_q));
      PH_CMN:  ref_w = (BW'(1) << (R-1-int'(ns_q))) - (BW'(1) << off_q);
      PH_BS:   ref_w = bs_ref;
      default: ref_w = '0;
    endcase
  end

  assign s_ref = (phase_q == PH_IDLE) ? '0 : ref_w[R-1:0];
  assign busy  = (phase_q != PH_IDLE);

  // Next-state of one comparison.
  always_comb begin
    phase_n = phase_q;
    lo_n    = lo_q;
    hi_n    = hi_q;
    ns_n    = ns_q;
    off_n   = off_q;
    first_n = first_q;
    unique case (phase_q)
      PH_CMB: begin
        if (!s_comp) begin            // prediction holds
          hi_n    = ref_w;
          phase_n = PH_BS;
        end else begin                // prediction failed: roll back
          lo_n = ref_w;
          if (ns_q == '0) phase_n = PH_BS;
          else            ns_n = (ns_q > stp_q) ? ns_q - stp_q : '0;
        end
      end
      PH_CMN: begin
        if (s_comp) begin
          lo_n = ref_w;
          // Above the first reference: fall back to CMB (N_off removed).
          // Above a later one: the input lies between two references.
          phase_n = first_q ? PH_CMB : PH_BS;
        end else begin
          hi_n    = ref_w;
          first_n = 1'b0;
          if ({1'b0, off_q} + {1'b0, stp_q} >= {1'b0, PW'(R-1)} - {1'b0, ns_q})
            phase_n = PH_BS;          // next reference would be <= 0
          else
            off_n = off_q + stp_q;
        end
      end
      PH_BS: begin
        if (s_comp) lo_n = ref_w;
        else        hi_n = ref_w;
      end
      default: ;
    endcase
    finish = (phase_q != PH_IDLE) && (phase_n == PH_BS) && (lo_n + BW'(1) == hi_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      lo_q    <= '0;
      hi_q    <= FULL;
      ns_q    <= '0;
      off_q   <= '0;
      stp_q   <= PW'(1);
      first_q <= 1'b0;
      cnt_q   <= '0;
      done    <= 1'b0;
      dout    <= '0;
      steps   <= '0;
      method  <= METHOD_CMN;
    end else begin
      done <= 1'b0;
      if (phase_q == PH_IDLE) begin
        if (start) begin
          phase_q <= cmn_ok ? PH_CMN : PH_CMB;
          lo_q    <= '0;
          hi_q    <= FULL;
          ns_q    <= nst_start;
          off_q   <= params.noff;
          stp_q   <= stp_start;
          first_q <= 1'b1;
          cnt_q   <= '0;
          method  <= params.method;
        end
      end else begin
        lo_q    <= lo_n;
        hi_q    <= hi_n;
        ns_q    <= ns_n;
        off_q   <= off_n;
        first_q <= first_n;
        cnt_q   <= cnt_q + 1'b1;
        if (finish) begin
          phase_q <= PH_IDLE;
          done    <= 1'b1;
          dout    <= lo_n[R-1:0];
          steps   <= cnt_q + 1'b1;
        end else begin
          phase_q <= phase_n;
        end
      end
    end
  end

  // The bounds always enclose at least one code while converting.
  a_bounds_ordered: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (lo_q < hi_q));
  // A conversion never takes more comparisons than the bits it resolves plus
  // the predictions it can make.
  a_steps_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(cnt_q) <= 2*R));

endmodule
