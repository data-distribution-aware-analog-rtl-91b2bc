// tb_sar_logic: self-checking test of the SAR control unit.
// An ideal input code v stands for the analog input: the comparator decision
// is s_comp = (v >= s_ref). Checks:
//  * the worked examples of both methods at R = 5 (reference sequence and the
//    number of comparisons: CMB with N_start=2, N_step=1; CMN with N_start=1,
//    N_off=1, N_step=1);
//  * every input code, for every parameter set, at R = 5 and on random codes
//    and parameters at R = 8: the result equals the input and the comparison
//    count equals a bit-by-bit reference model written separately here;
//  * done arrives exactly `steps` cycles after start.
module tb_sar_logic;
  import adc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- R = 5 instance ----------------
  localparam int R5 = 5;
  logic start5; conv_params_t p5; logic [R5-1:0] sref5, dout5;
  logic busy5, done5; logic [$clog2(R5+1)+1:0] steps5; method_e m5;
  int v5;
  sar_logic dut5 (.clk, .rst_n, .start(start5), .params(p5), .s_comp(v5 >= int'(sref5)),
                  .s_ref(sref5), .busy(busy5), .done(done5), .dout(dout5),
                  .steps(steps5), .method(m5));

  // ---------------- R = 8 instance ----------------
  localparam int R8 = 8;
  logic start8; conv_params_t p8; logic [R8-1:0] sref8, dout8;
  logic busy8, done8; logic [$clog2(R8+1)+1:0] steps8; method_e m8;
  int v8;
  sar_logic #(.R(R8)) dut8 (.clk, .rst_n, .start(start8), .params(p8), .s_comp(v8 >= int'(sref8)),
                  .s_ref(sref8), .busy(busy8), .done(done8), .dout(dout8),
                  .steps(steps8), .method(m8));

  // Reference model: counts comparisons of the methods, resolving the final
  // bits one by one and skipping those the known bounds already fix.
  function automatic int model_steps(int R, int v, bit cmn, int nstart, int nstep, int noff);
    int ns, st, cnt, lo, hi, rf, off, code;
    bit go_cmb, to_bs;
    ns = (nstart > R-1) ? R-1 : nstart;
    st = (nstep == 0) ? 1 : nstep;
    cnt = 0; lo = 0; hi = 1 << R;
    go_cmb = 1;
    if (cmn && noff < R-1-ns) begin
      off = noff;
      rf = (1 << (R-1-ns)) - (1 << off);
      cnt++;
      if (v >= rf) lo = rf;
      else begin
        go_cmb = 0;
        hi = rf;
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
    if (go_cmb) begin
      forever begin
        rf = 1 << (R-1-ns);
        cnt++;
        if (v < rf) begin hi = rf; break; end
        lo = rf;
        if (ns == 0) break;
        ns = (ns > st) ? ns - st : 0;
      end
    end
    code = 0;
    for (int j = R-1; j >= 0; j--) begin
      if ((code | (1 << j)) >= hi) continue;                // bit is 0
      if (code + (1 << j) - 1 < lo) begin code |= 1 << j; continue; end // bit is 1
      cnt++;
      if (v >= (code | (1 << j))) code |= 1 << j;
    end
    return cnt;
  endfunction

  int refs5[$];
  always @(posedge clk) if (busy5) refs5.push_back(int'(sref5));

  task automatic conv5(int v, bit cmn, int ns, int st, int off, output int code, output int stp, output int lat);
    v5 = v;
    p5.method = cmn ? METHOD_CMN : METHOD_CMB;
    p5.nstart = PW'(ns); p5.nstep = PW'(st); p5.noff = PW'(off);
    refs5.delete();
    @(negedge clk) start5 = 1;
    @(negedge clk) start5 = 0;
    lat = 1;
    while (!done5) begin @(negedge clk); lat++; end
    lat--;   // cycles from the start edge to the edge that raised done
    code = int'(dout5); stp = int'(steps5);
  endtask

  task automatic conv8(int v, bit cmn, int ns, int st, int off, output int code, output int stp);
    v8 = v;
    p8.method = cmn ? METHOD_CMN : METHOD_CMB;
    p8.nstart = PW'(ns); p8.nstep = PW'(st); p8.noff = PW'(off);
    @(negedge clk) start8 = 1;
    @(negedge clk) start8 = 0;
    while (!done8) @(negedge clk);
    code = int'(dout8); stp = int'(steps8);
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic example(int v, bit cmn, int ns, int st, int off, int exp_refs[$], int exp_steps);
    int code, stp, lat;
    conv5(v, cmn, ns, st, off, code, stp, lat);
    chk(code == v, $sformatf("example v=%0d code=%0d", v, code));
    chk(stp == exp_steps, $sformatf("example v=%0d steps=%0d exp %0d", v, stp, exp_steps));
    for (int i = 0; i < exp_refs.size(); i++)
      chk(i < refs5.size() && refs5[i] == exp_refs[i],
          $sformatf("example v=%0d ref[%0d]=%0d exp %0d", v, i, (i < refs5.size()) ? refs5[i] : -1, exp_refs[i]));
  endtask

  initial begin
    int code, stp, lat, v, ns, st, off; bit cmn;
    start5 = 0; start8 = 0; v5 = 0; v8 = 0; p5 = '0; p8 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // CMB, N_start=2, N_step=1: S_ref0=b00100, S_ref1=b01000, S_ref2=b10000
    example(2,  0, 2, 1, 0, '{4},          3);
    example(5,  0, 2, 1, 0, '{4, 8},       4);
    example(12, 0, 2, 1, 0, '{4, 8, 16},   6);
    example(20, 0, 2, 1, 0, '{4, 8, 16},   7);
    // CMN, N_start=1, N_off=1, N_step=1: S_ref0=b00110, S_ref1=b00100,
    // after fallback S_ref2=b01000, S_ref3=b10000
    example(3,  1, 1, 1, 1, '{6, 4},       4);
    example(5,  1, 1, 1, 1, '{6, 4},       3);
    example(7,  1, 1, 1, 1, '{6, 8},       3);
    example(10, 1, 1, 1, 1, '{6, 8, 16},   6);
    example(25, 1, 1, 1, 1, '{6, 8, 16},   7);
    // Exhaustive at R = 5 over codes and parameters, with latency check.
    for (int c = 0; c < 2; c++)
      for (ns = 0; ns < 6; ns++)
        for (st = 0; st < 4; st++)
          for (off = 0; off < 5; off++)
            for (v = 0; v < 32; v += 1) begin
              if (c == 1 && off > 0) continue;
              conv5(v, c == 0, ns, st, off, code, stp, lat);
              chk(code == v, $sformatf("R5 v=%0d code=%0d", v, code));
              chk(stp == model_steps(5, v, c == 0, ns, st, off),
                  $sformatf("R5 v=%0d cmn=%0d ns=%0d st=%0d off=%0d steps=%0d exp %0d",
                            v, c == 0, ns, st, off, stp, model_steps(5, v, c == 0, ns, st, off)));
              chk(lat == stp, $sformatf("R5 latency %0d vs steps %0d", lat, stp));
              chk(m5 == ((c == 0 && off < 4 - ((ns > 4) ? 4 : ns)) ? METHOD_CMN : METHOD_CMB) || c == 0,
                  "R5 method");
            end
    // Random at R = 8.
    repeat (3000) begin
      v = $urandom_range(255); cmn = 1'($urandom);
      ns = $urandom_range(8); st = $urandom_range(4); off = $urandom_range(7);
      conv8(v, cmn, ns, st, off, code, stp);
      chk(code == v, $sformatf("R8 v=%0d code=%0d", v, code));
      chk(stp == model_steps(8, v, cmn, ns, st, off),
          $sformatf("R8 v=%0d steps=%0d exp %0d", v, stp, model_steps(8, v, cmn, ns, st, off)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
