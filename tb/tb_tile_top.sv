// tb_tile_top: end-to-end test of a tile at its default size: eight PEs,
// each with a 32 x 32 crossbar of 1-bit cells and its own 5-bit
// distribution-aware SAR-ADC, an adder tree and tile buffers. The weight
// matrix is 256 x 32, the input vector 256 activations of 8 bits.
// For each operation it checks every column of y = W x (with per-slice ADC
// clipping at 31) against a model computed here, the total ADC comparisons
// against a separately written model of the conversion methods using each
// PE's own register settings, and the cycle count
// NPE*ROWS + 2 + (slowest PE) + COLS + 1 with the PE time
// NSLICE*(COLS+2) + comparisons of that PE.
// Mechanisms counted (each must happen): PEs finishing at different times so
// that the tile waits for the slowest, per-PE parameter sets that differ,
// CMB roll-back, CMN fall-back, CMN offset step, ADC saturation.
module tb_tile_top;
  import adc_pkg::*;
  localparam int NPE = 8, ROWS = 32, COLS = 32, NSLICE = 8, R = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_we; logic [7:0] in_addr; logic [7:0] in_data;
  logic w_we; logic [2:0] w_pe; logic [4:0] w_row, w_col; logic [0:0] w_level;
  logic cfg_we; logic [2:0] cfg_pe; logic [2:0] cfg_addr; logic [CFG_W-1:0] cfg_wdata, cfg_rdata;
  logic start, busy, done;
  logic [4:0] out_addr; logic [15:0] out_data;
  logic [31:0] stat_steps;

  tile_top dut (.*);

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

  int g [NPE][ROWS][COLS];
  int x [NPE*ROWS];
  int regs [NPE][7];

  // mechanism counters
  int n_rollback = 0, n_fallback = 0, n_cmn_step = 0, n_saturate = 0, n_uneven = 0;
  int first_done_t = -1, t = 0;
  for (genvar p = 0; p < NPE; p++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pe[p].u_pe.u_adc.u_sar.phase_q == PH_CMB && dut.g_pe[p].u_pe.u_adc.s_comp) n_rollback++;
      if (dut.g_pe[p].u_pe.u_adc.u_sar.phase_q == PH_CMN && dut.g_pe[p].u_pe.u_adc.s_comp &&
          dut.g_pe[p].u_pe.u_adc.u_sar.first_q) n_fallback++;
      if (dut.g_pe[p].u_pe.u_adc.u_sar.phase_q == PH_CMN && !dut.g_pe[p].u_pe.u_adc.s_comp &&
          dut.g_pe[p].u_pe.u_adc.u_sar.phase_n == PH_CMN) n_cmn_step++;
      if (dut.g_pe[p].u_pe.u_adc.u_sar.done && dut.g_pe[p].u_pe.v_in >= analog_t'((1 << R) * 256)) n_saturate++;
    end
  end
  always @(posedge clk) begin
    t++;
    if (|dut.pe_done) begin
      if (first_done_t < 0) first_done_t = t;
      else if (t != first_done_t) n_uneven++;
    end
  end

  task automatic wr_cfg(int p, int a, int d);
    @(negedge clk); cfg_we = 1; cfg_pe = 3'(p); cfg_addr = 3'(a); cfg_wdata = CFG_W'(d);
    @(negedge clk); cfg_we = 0;
    regs[p][a] = d;
  endtask

  task automatic operation(string name);
    int lat, bl, v, e, steps_p, slowest, tot;
    for (int i = 0; i < NPE * ROWS; i++) begin
      @(negedge clk); in_we = 1; in_addr = 8'(i); in_data = 8'(x[i]);
    end
    @(negedge clk) in_we = 0;
    first_done_t = -1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    lat--;
    slowest = 0; tot = 0;
    for (int p = 0; p < NPE; p++) begin
      steps_p = 0;
      for (int j = 0; j < COLS; j++)
        for (int s = 0; s < NSLICE; s++) begin
          bl = 0;
          for (int i = 0; i < ROWS; i++) bl += ((x[p * ROWS + i] >> s) & 1) * g[p][i][j];
          v = (bl > (1 << R) - 1) ? (1 << R) - 1 : bl;
          if ((s % (regs[p][0] + regs[p][1])) < regs[p][0])
            steps_p += model_steps(v, 1, regs[p][2], regs[p][3], regs[p][4]);
          else
            steps_p += model_steps(v, 0, regs[p][5], regs[p][6], 0);
        end
      tot += steps_p;
      if (NSLICE * (COLS + 2) + steps_p > slowest) slowest = NSLICE * (COLS + 2) + steps_p;
    end
    for (int j = 0; j < COLS; j++) begin
      e = 0;
      for (int p = 0; p < NPE; p++)
        for (int s = 0; s < NSLICE; s++) begin
          bl = 0;
          for (int i = 0; i < ROWS; i++) bl += ((x[p * ROWS + i] >> s) & 1) * g[p][i][j];
          v = (bl > (1 << R) - 1) ? (1 << R) - 1 : bl;
          e += v << s;
        end
      out_addr = 5'(j); #1;
      chk(int'(out_data) == e, $sformatf("%s: column %0d = %0d, expected %0d", name, j, out_data, e));
    end
    chk(int'(stat_steps) == tot, $sformatf("%s: comparisons %0d, expected %0d", name, stat_steps, tot));
    chk(lat == NPE * ROWS + 2 + slowest + COLS + 1,
        $sformatf("%s: cycles %0d, expected %0d", name, lat, NPE * ROWS + 2 + slowest + COLS + 1));
    $display("%s: %0d cycles, %0d comparisons (binary search: %0d)", name, lat, stat_steps, NPE * COLS * NSLICE * R);
  endtask

  initial begin
    in_we = 0; in_addr = 0; in_data = 0; w_we = 0; w_pe = 0; w_row = 0; w_col = 0; w_level = 0;
    cfg_we = 0; cfg_pe = 0; cfg_addr = 0; cfg_wdata = 0; start = 0; out_addr = 0;
    for (int p = 0; p < NPE; p++) regs[p] = '{5, 3, 1, 1, 1, 2, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weights: PE density varies from sparse to dense, column 0 of PE 0 full
    for (int p = 0; p < NPE; p++)
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          g[p][i][j] = ((p == 0 && j == 0) || $urandom_range(7) < 1 + p) ? 1 : 0;
          @(negedge clk); w_we = 1; w_pe = 3'(p); w_row = 5'(i); w_col = 5'(j); w_level = 1'(g[p][i][j]);
        end
    @(negedge clk) w_we = 0;
    // per-PE parameter sets: sparse PEs predict more zero bits
    for (int p = 0; p < NPE; p++) begin
      wr_cfg(p, 5, (p < 4) ? 3 : 2);
      wr_cfg(p, 2, (p < 4) ? 1 : 0);
      wr_cfg(p, 4, (p < 4) ? 1 : 2);
    end
    for (int p = 0; p < NPE; p++) begin
      cfg_pe = 3'(p); cfg_addr = 3'(5); #1;
      chk(int'(cfg_rdata) == regs[p][5], $sformatf("read back R_Start_1 of PE %0d", p));
    end
    repeat (2) begin
      for (int i = 0; i < NPE * ROWS; i++) begin
        x[i] = $urandom_range(31);
        for (int b = 5; b < 8; b++) if ($urandom_range(99) < 10) x[i] |= 1 << b;
      end
      operation("random input");
    end
    for (int i = 0; i < NPE * ROWS; i++) x[i] = 255;
    operation("full-scale input");

    chk(n_uneven > 0,   "mechanism never seen: PEs finishing at different times");
    chk(n_rollback > 0, "mechanism never seen: CMB roll-back");
    chk(n_fallback > 0, "mechanism never seen: CMN fall-back");
    chk(n_cmn_step > 0, "mechanism never seen: CMN offset step");
    chk(n_saturate > 0, "mechanism never seen: ADC saturation");
    $display("mechanisms: uneven_done=%0d rollback=%0d fallback=%0d cmn_step=%0d saturate=%0d",
             n_uneven, n_rollback, n_fallback, n_cmn_step, n_saturate);
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
