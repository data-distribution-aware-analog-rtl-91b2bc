// tb_pe_top: end-to-end test of the processing element at its default size
// (32 x 32 crossbar of 1-bit cells, 8-bit inputs in eight 1-bit slices,
// 5-bit ADC). A random binary weight matrix is programmed and several input
// vectors are multiplied. For each product the testbench checks
//  * every column result against sum_s min(bitline(s), 31) * 2^s computed
//    here from the weights and inputs;
//  * the total number of ADC comparisons against a separately written model
//    of CMN / CMB / binary search, with CMN on slices 0..C_0-1 and CMB on
//    the following C_1 slices;
//  * the latency NSLICE * (COLS + 2) + comparisons.
// Inputs are drawn so that slices 0-4 give normal-shaped bitline outputs and
// slices 5-7 outputs biased toward zero, and one vector drives bitlines past
// full scale. The run counts how often each mechanism happened (CMB
// prediction held at once, CMB roll-back, CMN offset step, CMN fall-back to
// CMB, switch from CMN to CMB and back, ADC saturation, register write) and
// counts a failure for any that never happened.
module tb_pe_top;
  import adc_pkg::*;
  localparam int ROWS = 32, COLS = 32, IN_BITS = 8, NSLICE = 8, R = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_we; logic [4:0] in_addr; logic [7:0] in_data;
  logic w_we; logic [4:0] w_row, w_col; logic [0:0] w_level;
  logic cfg_we; logic [2:0] cfg_addr; logic [CFG_W-1:0] cfg_wdata, cfg_rdata;
  logic start, busy, done;
  logic [4:0] out_addr; logic [12:0] out_data;
  logic [31:0] stat_steps, stat_cmn_convs, stat_cmb_convs;
  method_e adc_mode;

  pe_top dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int model_steps(int v, bit cmn, int nstart, int nstep, int noff);
    int ns, st, cnt, lo, hi, rf, off, code;
    bit go_cmb;
    ns = (nstart > R-1) ? R-1 : nstart;
    st = (nstep == 0) ? 1 : nstep;
    cnt = 0; lo = 0; hi = 1 << R; go_cmb = 1;
    if (cmn && noff < R-1-ns) begin
      off = noff;
      rf = (1 << (R-1-ns)) - (1 << off);
      cnt++;
      if (v >= rf) lo = rf;
      else begin
        go_cmb = 0; hi = rf;
        forever begin
          if (off + st >= R-1-ns) break;
          off += st;
          rf = (1 << (R-1-ns)) - (1 << off);
          cnt++;
          if (v >= rf) begin lo = rf; break; end
          hi = rf;
        end
      end
    end
    if (go_cmb)
      forever begin
        rf = 1 << (R-1-ns);
        cnt++;
        if (v < rf) begin hi = rf; break; end
        lo = rf;
        if (ns == 0) break;
        ns = (ns > st) ? ns - st : 0;
      end
    code = 0;
    for (int j = R-1; j >= 0; j--) begin
      if ((code | (1 << j)) >= hi) continue;
      if (code + (1 << j) - 1 < lo) begin code |= 1 << j; continue; end
      cnt++;
      if (v >= (code | (1 << j))) code |= 1 << j;
    end
    return cnt;
  endfunction

  int g [ROWS][COLS];
  int x [ROWS];
  int regs [7];

  // ---- mechanism counters, from the ADC's internal state ----
  int n_cmb_hit = 0, n_rollback = 0, n_cmn_step = 0, n_fallback = 0;
  int n_sw_to_cmb = 0, n_sw_to_cmn = 0, n_saturate = 0, n_cfg = 0;
  method_e prev_mode = METHOD_CMN;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_adc.u_sar.phase_q == PH_CMB && !dut.u_adc.s_comp) n_cmb_hit++;
    if (dut.u_adc.u_sar.phase_q == PH_CMB && dut.u_adc.s_comp) n_rollback++;
    if (dut.u_adc.u_sar.phase_q == PH_CMN && !dut.u_adc.s_comp &&
        dut.u_adc.u_sar.phase_n == PH_CMN) n_cmn_step++;
    if (dut.u_adc.u_sar.phase_q == PH_CMN && dut.u_adc.s_comp && dut.u_adc.u_sar.first_q) n_fallback++;
    if (adc_mode != prev_mode) begin
      if (adc_mode == METHOD_CMB) n_sw_to_cmb++; else n_sw_to_cmn++;
    end
    prev_mode = adc_mode;
    if (dut.u_adc.u_sar.done && dut.v_in >= analog_t'((1 << R) * 256)) n_saturate++;
    if (cfg_we) n_cfg++;
  end

  task automatic wr_cfg(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = CFG_W'(d);
    @(negedge clk); cfg_we = 0;
    regs[a] = d;
  endtask

  task automatic product(string name);
    int lat, exp_steps, bl, v, conv;
    exp_steps = 0;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk); in_we = 1; in_addr = 5'(i); in_data = 8'(x[i]);
    end
    @(negedge clk) in_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    lat--;
    for (int j = 0; j < COLS; j++) begin
      int e = 0;
      for (int s = 0; s < NSLICE; s++) begin
        bl = 0;
        for (int i = 0; i < ROWS; i++) bl += ((x[i] >> s) & 1) * g[i][j];
        v = (bl > (1 << R) - 1) ? (1 << R) - 1 : bl;
        e += v << s;
        if ((s % (regs[0] + regs[1])) < regs[0])
          exp_steps += model_steps(v, 1, regs[2], regs[3], regs[4]);
        else
          exp_steps += model_steps(v, 0, regs[5], regs[6], 0);
      end
      out_addr = 5'(j); #1;
      chk(int'(out_data) == e, $sformatf("%s: column %0d = %0d, expected %0d", name, j, out_data, e));
    end
    conv = COLS * NSLICE;
    chk(int'(stat_steps) == exp_steps, $sformatf("%s: comparisons %0d, expected %0d", name, stat_steps, exp_steps));
    chk(int'(stat_cmn_convs + stat_cmb_convs) == conv, $sformatf("%s: conversions", name));
    chk(lat == NSLICE * (COLS + 2) + exp_steps,
        $sformatf("%s: latency %0d, expected %0d", name, lat, NSLICE * (COLS + 2) + exp_steps));
    $display("%s: %0d comparisons for %0d conversions (binary search: %0d), %0d cycles",
             name, stat_steps, conv, R * conv, lat);
  endtask

  // Normal-shaped low slices (dense random bits), sparse high slices.
  task automatic make_inputs(int high_pct);
    for (int i = 0; i < ROWS; i++) begin
      x[i] = $urandom_range(31);
      for (int b = 5; b < 8; b++) if ($urandom_range(99) < high_pct) x[i] |= 1 << b;
    end
  endtask

  initial begin
    in_we = 0; in_addr = 0; in_data = 0; w_we = 0; w_row = 0; w_col = 0; w_level = 0;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; start = 0; out_addr = 0;
    regs = '{5, 3, 1, 1, 1, 2, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights: about 3 of 4 cells on
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        g[i][j] = (j < 2 || $urandom_range(3) != 0) ? 1 : 0;  // columns 0, 1 full
        @(negedge clk); w_we = 1; w_row = 5'(i); w_col = 5'(j); w_level = 1'(g[i][j]);
      end
    @(negedge clk) w_we = 0;
    for (int a = 0; a < 7; a++) begin
      cfg_addr = 3'(a); #1;
      chk(int'(cfg_rdata) == regs[a], $sformatf("reset value of register %0d", a));
    end
    // 1: registers at reset
    make_inputs(8);
    product("reset parameters");
    // 2-4: parameters suited to this data: CMN starts just below the
    // peak near 12 (2^4 - 2^2), CMB predicts the top three bits zero.
    wr_cfg(2, 0); wr_cfg(3, 1); wr_cfg(4, 2); wr_cfg(5, 3); wr_cfg(6, 1);
    repeat (3) begin make_inputs(8); product("tuned parameters"); end
    // 5: all inputs full scale, bitlines beyond the ADC range
    for (int i = 0; i < ROWS; i++) x[i] = 255;
    product("saturating input");
    // 6: other switching periods (C_0 = 3, C_1 = 5)
    wr_cfg(0, 3); wr_cfg(1, 5);
    make_inputs(8);
    product("C0=3 C1=5");

    chk(n_cmb_hit > 0,   "mechanism never seen: CMB prediction held");
    chk(n_rollback > 0,  "mechanism never seen: CMB roll-back");
    chk(n_cmn_step > 0,  "mechanism never seen: CMN offset step");
    chk(n_fallback > 0,  "mechanism never seen: CMN fall-back to CMB");
    chk(n_sw_to_cmb > 0, "mechanism never seen: switch to CMB");
    chk(n_sw_to_cmn > 0, "mechanism never seen: switch back to CMN");
    chk(n_saturate > 0,  "mechanism never seen: ADC saturation");
    chk(n_cfg > 0,       "mechanism never seen: register write");
    $display("mechanisms: cmb_hit=%0d rollback=%0d cmn_step=%0d fallback=%0d to_cmb=%0d to_cmn=%0d saturate=%0d cfg=%0d",
             n_cmb_hit, n_rollback, n_cmn_step, n_fallback, n_sw_to_cmb, n_sw_to_cmn, n_saturate, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
