// tb_reconfig_sar_adc: the ADC with its behavioural CDAC and comparator.
// Analog inputs with fractional parts (and above full scale) are converted
// over many input slices; the test checks that
//  * the code is floor(V_in / V_LSB), clamped to 2^R - 1;
//  * the number of comparisons matches a separately written model of the
//    method in force, and done comes that many cycles after start;
//  * with the reset registers (C_0 = 5, C_1 = 3) slices 0-4 of every group
//    of eight use CMN and slices 5-7 use CMB;
//  * written registers change the parameters and the switching pattern;
//  * over a biased input set CMB needs fewer comparisons than R per sample.
module tb_reconfig_sar_adc;
  import adc_pkg::*;
  localparam int R = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we; logic [2:0] cfg_addr; logic [CFG_W-1:0] cfg_wdata, cfg_rdata;
  logic slice_clear, slice_done, start, busy, done;
  method_e s_switch, method;
  logic [CNT_W-1:0] switch_cnt;
  analog_t v_in;
  logic [R-1:0] dout;
  logic [$clog2(R+1)+1:0] steps;
  reconfig_sar_adc dut (.*);

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

  int regs [7];
  int cmb_steps = 0, cmb_convs = 0;

  task automatic wr(int a, int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = CFG_W'(d);
    @(negedge clk); cfg_we = 0;
    regs[a] = d;
  endtask

  task automatic convert(int vfix, bit exp_cmn);
    int v, lat, es;
    v = vfix / 256; if (v > (1 << R) - 1) v = (1 << R) - 1;
    v_in = analog_t'(vfix);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    lat--;
    es = exp_cmn ? model_steps(v, 1, regs[2], regs[3], regs[4])
                 : model_steps(v, 0, regs[5], regs[6], 0);
    chk(int'(dout) == v, $sformatf("vin=%0d/256 code=%0d exp %0d", vfix, dout, v));
    chk(int'(steps) == es, $sformatf("vin=%0d/256 steps=%0d exp %0d (cmn=%0d)", vfix, steps, es, exp_cmn));
    chk(lat == int'(steps), $sformatf("latency %0d steps %0d", lat, steps));
    chk(method == (exp_cmn ? METHOD_CMN : METHOD_CMB), $sformatf("method %0d exp cmn=%0d", method, exp_cmn));
    if (!exp_cmn) begin cmb_steps += int'(steps); cmb_convs++; end
  endtask

  task automatic end_slice();
    @(negedge clk) slice_done = 1;
    @(negedge clk) slice_done = 0;
  endtask

  // Run `groups` vectors of 8 slices, `per` conversions per slice.
  task automatic run(int groups, int per);
    @(negedge clk) slice_clear = 1;
    @(negedge clk) slice_clear = 0;
    for (int g = 0; g < groups; g++)
      for (int s = 0; s < 8; s++) begin
        bit cmn;
        cmn = (s % (regs[0] + regs[1])) < regs[0];
        for (int k = 0; k < per; k++) begin
          int vfix;
          // normal-ish around 12 LSB for CMN slices, biased toward 0 for CMB
          if (cmn) vfix = 8 * 256 + $urandom_range(10 * 256);
          else     vfix = ($urandom_range(9) == 0) ? $urandom_range(40 * 256) : $urandom_range(3 * 256);
          convert(vfix, cmn);
        end
        end_slice();
      end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; slice_clear = 0; slice_done = 0;
    start = 0; v_in = 0;
    regs = '{5, 3, 1, 1, 1, 2, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 7; a++) begin
      cfg_addr = 3'(a); #1;
      chk(int'(cfg_rdata) == regs[a], $sformatf("reset reg %0d", a));
    end
    run(3, 6);
    chk(cmb_convs > 0 && cmb_steps < R * cmb_convs,
        $sformatf("CMB average steps %0d/%0d not below R", cmb_steps, cmb_convs));
    // new parameter sets and switching periods
    wr(0, 3); wr(1, 5); wr(2, 2); wr(3, 2); wr(4, 0); wr(5, 3); wr(6, 2);
    run(2, 5);
    wr(0, 8); wr(1, 0); wr(2, 0); wr(3, 1); wr(4, 2);
    run(1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
