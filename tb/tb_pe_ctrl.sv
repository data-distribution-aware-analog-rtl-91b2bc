// tb_pe_ctrl: the PE sequencer against a stand-in ADC that answers each
// start after a random number k of cycles (k comparisons). Checks, for
// several products: one DAC/sample cycle per slice, results handed to the
// shift-and-add unit for columns 0..COLS-1 in order with the right slice
// index, one slice_done per slice, clear pulses at start, the comparison and
// per-method conversion statistics, and done exactly NSLICE * (COLS + 2) + S_total
// edges after start.
module tb_pe_ctrl;
  import adc_pkg::*;
  localparam int R = 5, COLS = 32, NSLICE = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, dac_en, sh_sample, obuf_clear, sa_valid;
  logic [3:0] slice; logic [4:0] col;
  logic adc_start, adc_slice_clear, adc_slice_done, adc_done;
  logic [$clog2(R+1)+1:0] adc_steps; method_e adc_method;
  logic [31:0] stat_steps, stat_cmn_convs, stat_cmb_convs;
  pe_ctrl dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Stand-in ADC.
  int rem = 0, cur_k = 0, total_k = 0, cmn_n = 0, cmb_n = 0;
  always @(posedge clk) begin
    adc_done <= 1'b0;
    if (rem > 0) begin
      rem--;
      if (rem == 0) begin
        adc_done   <= 1'b1;
        adc_steps  <= ($clog2(R+1)+2)'(cur_k);
        adc_method <= (slice < 5) ? METHOD_CMN : METHOD_CMB;
        if (slice < 5) cmn_n++; else cmb_n++;
      end
    end
    if (adc_start) begin
      cur_k = $urandom_range(10, 1);
      total_k += cur_k;
      rem = cur_k;
    end
  end

  // Monitor of the sequence.
  int exp_col = 0, exp_slice = 0, drives = 0, slice_ends = 0, clears = 0;
  always @(posedge clk) if (rst_n) begin
    if (dac_en) begin
      drives++;
      if (!sh_sample || !adc_start || int'(slice) != exp_slice) begin
        failures++; $display("FAIL: drive cycle of slice %0d", exp_slice);
      end
    end
    if (sa_valid) begin
      checks++;
      if (int'(col) != exp_col || int'(slice) != exp_slice) begin
        failures++; $display("FAIL: result col %0d slice %0d exp %0d/%0d", col, slice, exp_col, exp_slice);
      end
      exp_col++;
    end
    if (adc_slice_done) begin
      checks++;
      if (exp_col != COLS) begin failures++; $display("FAIL: slice end after %0d columns", exp_col); end
      exp_col = 0; exp_slice++; slice_ends++;
    end
    if (obuf_clear && adc_slice_clear) clears++;
  end

  initial begin
    int lat;
    start = 0; adc_steps = 0; adc_method = METHOD_CMN;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) begin
      total_k = 0; cmn_n = 0; cmb_n = 0; exp_col = 0; exp_slice = 0; drives = 0; slice_ends = 0; clears = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      lat--;
      chk(lat == NSLICE * (COLS + 2) + total_k, $sformatf("latency %0d exp %0d", lat, NSLICE * (COLS + 2) + total_k));
      chk(drives == NSLICE && slice_ends == NSLICE && clears == 1, "slice count / clear");
      chk(int'(stat_steps) == total_k, "stat_steps");
      chk(int'(stat_cmn_convs) == cmn_n && int'(stat_cmb_convs) == cmb_n &&
          cmn_n == 5 * COLS && cmb_n == 3 * COLS, "conversion counts");
      chk(!busy, "idle after done");
      repeat ($urandom_range(3)) @(negedge clk);
    end
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
