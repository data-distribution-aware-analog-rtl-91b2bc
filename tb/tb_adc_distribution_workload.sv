// tb_adc_distribution_workload: the conversion strategy on bitline outputs
// shaped like those of a real crossbar, at 6-bit resolution (outputs 0..63).
// Eight input slices: slices 0-4 are roughly normal (means 30, 24, 18, 12,
// 9, spread a few LSB), slices 5-7 are biased toward zero with 67 %, 57 % and
// 93 % of the outputs exactly 0 and a geometric tail with rare large values.
// The testbench then
//  1. runs the offline parameter search on a training draw: every
//     (N_start, N_step, N_off) for the CMN group of slices 0-4 and every
//     (N_start, N_step) for the CMB group of slices 5-7, keeping the set
//     with the fewest comparisons (its own model of the methods);
//  2. loads the winners and C_0 = 5, C_1 = 3 into the ADC registers;
//  3. converts a fresh test draw slice by slice and checks every code,
//     that the comparisons match the model, and that the strategy needs
//     fewer comparisons than plain binary search (R per sample);
//  4. prints the saving for each group.
module tb_adc_distribution_workload;
  import adc_pkg::*;
  localparam int R = 6, NS = 8, NTRAIN = 300, NTEST = 150;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we; logic [2:0] cfg_addr; logic [CFG_W-1:0] cfg_wdata, cfg_rdata;
  logic slice_clear, slice_done, start, busy, done;
  method_e s_switch, method; logic [CNT_W-1:0] switch_cnt;
  analog_t v_in; logic [R-1:0] dout; logic [$clog2(R+1)+1:0] steps;
  reconfig_sar_adc #(.R(R)) dut (.*);

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

  // Sample of slice s, in 1/256 LSB (fractional analog value).
  int mean_q [5] = '{30, 24, 18, 12, 9};
  int zero_pct [3] = '{67, 57, 93};
  function automatic int draw(int s);
    int v;
    if (s < 5) begin
      // sum of four uniforms: approximately normal, sd about 3.5 LSB
      v = mean_q[s] * 256 - 6 * 256;
      repeat (4) v += $urandom_range(3 * 256);
      if (v < 0) v = 0;
    end else begin
      if ($urandom_range(99) < zero_pct[s-5]) v = $urandom_range(255);
      else begin
        v = 256;
        while ($urandom_range(99) < 55) v += 256;      // geometric tail
        if ($urandom_range(99) < 2) v += 30 * 256;     // rare outlier
        v += $urandom_range(255);
      end
    end
    if (v > 80 * 256) v = 80 * 256;
    return v;
  endfunction

  function automatic int code_of(int vfix);
    int c = vfix / 256;
    return (c > (1 << R) - 1) ? (1 << R) - 1 : c;
  endfunction

  int train [NS][NTRAIN];
  int best0 [3], best1 [2];

  task automatic wr(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = CFG_W'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int best, tot, used [2], model [2], n [2];
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; slice_clear = 0; slice_done = 0; start = 0; v_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. offline search
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < NTRAIN; k++) train[s][k] = code_of(draw(s));
    best = 1 << 30;
    for (int a = 0; a < R; a++) for (int b = 1; b <= 4; b++) for (int c = 0; c < R; c++) begin
      tot = 0;
      for (int s = 0; s < 5; s++) for (int k = 0; k < NTRAIN; k++) tot += model_steps(train[s][k], 1, a, b, c);
      if (tot < best) begin best = tot; best0 = '{a, b, c}; end
    end
    best = 1 << 30;
    for (int a = 0; a < R; a++) for (int b = 1; b <= 4; b++) begin
      tot = 0;
      for (int s = 5; s < NS; s++) for (int k = 0; k < NTRAIN; k++) tot += model_steps(train[s][k], 0, a, b, 0);
      if (tot < best) begin best = tot; best1 = '{a, b}; end
    end
    $display("search: CMN N_start=%0d N_step=%0d N_off=%0d, CMB N_start=%0d N_step=%0d",
             best0[0], best0[1], best0[2], best1[0], best1[1]);
    // 2. load the registers
    wr(0, 5); wr(1, 3);
    wr(2, best0[0]); wr(3, best0[1]); wr(4, best0[2]); wr(5, best1[0]); wr(6, best1[1]);
    // 3. convert a fresh draw
    used = '{0, 0}; model = '{0, 0}; n = '{0, 0};
    @(negedge clk) slice_clear = 1;
    @(negedge clk) slice_clear = 0;
    for (int s = 0; s < NS; s++) begin
      int grp;
      grp = (s < 5) ? 0 : 1;
      chk(s_switch == ((grp == 0) ? METHOD_CMN : METHOD_CMB), $sformatf("slice %0d method", s));
      for (int k = 0; k < NTEST; k++) begin
        int vfix, c;
        vfix = draw(s); c = code_of(vfix);
        v_in = analog_t'(vfix);
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        while (!done) @(negedge clk);
        chk(int'(dout) == c, $sformatf("slice %0d code %0d exp %0d", s, dout, c));
        used[grp] += int'(steps); n[grp]++;
        model[grp] += (grp == 0) ? model_steps(c, 1, best0[0], best0[1], best0[2])
                                 : model_steps(c, 0, best1[0], best1[1], 0);
      end
      @(negedge clk) slice_done = 1;
      @(negedge clk) slice_done = 0;
    end
    for (int g2 = 0; g2 < 2; g2++) begin
      chk(used[g2] == model[g2], $sformatf("group %0d comparisons %0d model %0d", g2, used[g2], model[g2]));
      chk(used[g2] < R * n[g2], $sformatf("group %0d no saving: %0d vs %0d", g2, used[g2], R * n[g2]));
      $display("%s group: %0d comparisons for %0d samples, binary search %0d (%0d %% fewer)",
               (g2 == 0) ? "CMN" : "CMB", used[g2], n[g2], R * n[g2], 100 - (100 * used[g2]) / (R * n[g2]));
    end
    $display("overall: %0d of %0d comparisons", used[0] + used[1], R * (n[0] + n[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
