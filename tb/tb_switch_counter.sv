// tb_switch_counter: checks the CMN/CMB alternation of the switch counter.
// With C_0 = 5, C_1 = 3 over eight input slices, slices 0-4 must select CMN
// and 5-7 CMB, repeating; then other period lengths, a zero-length period,
// and clear in the middle of a period are checked against an independent
// model built from the expected slice pattern.
module tb_switch_counter;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, slice_done;
  logic [CNT_W-1:0] rc0, rc1, cnt;
  method_e sel;
  switch_counter dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Expected method of slice s (counted from a clear) for periods c0, c1.
  function automatic method_e expect_sel(int s, int c0, int c1);
    if (c0 == 0 && c1 == 0) return METHOD_CMN;
    if (c0 == 0) return METHOD_CMB;
    if (c1 == 0) return METHOD_CMN;
    return ((s % (c0 + c1)) < c0) ? METHOD_CMN : METHOD_CMB;
  endfunction

  task automatic run(int c0, int c1, int slices);
    rc0 = CNT_W'(c0); rc1 = CNT_W'(c1);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int s = 0; s < slices; s++) begin
      chk(sel == expect_sel(s, c0, c1),
          $sformatf("c0=%0d c1=%0d slice %0d sel=%0d", c0, c1, s, sel));
      // a few idle cycles between slice ends must not move the counter
      repeat ($urandom_range(2)) @(negedge clk);
      slice_done = 1;
      @(negedge clk) slice_done = 0;
    end
  endtask

  initial begin
    clear = 0; slice_done = 0; rc0 = 5; rc1 = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 3, 24);          // the worked example, three passes over 8 slices
    run(2, 6, 20);
    run(1, 1, 10);
    run(0, 4, 6);
    run(4, 0, 6);
    run(0, 0, 4);
    run(7, 2, 30);
    // clear in the middle of a CMB period restarts at slice 0 (CMN)
    rc0 = 2; rc1 = 2;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    repeat (3) begin slice_done = 1; @(negedge clk); end
    slice_done = 0;
    chk(sel == METHOD_CMB, "mid-period sel before clear");
    clear = 1; @(negedge clk) clear = 0;
    chk(sel == METHOD_CMN && cnt == 0, "clear restarts pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
