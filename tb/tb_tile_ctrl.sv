// tb_tile_ctrl: the tile sequencer with stand-in PEs that finish after
// random, different run times. Checks the load order (every PE row gets
// the right input buffer word, exactly once), a single start, that the
// reduction waits for the slowest PE, that columns 0..COLS-1 are presented
// in order and written one cycle later to the same column, and the total
// cycle count NPE*ROWS + 2 + (slowest PE) + COLS + 1.
module tb_tile_ctrl;
  localparam int NPE = 8, ROWS = 32, COLS = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, pe_start, at_valid, at_out_valid, tob_we;
  logic [7:0] tib_raddr; logic [NPE-1:0] pe_in_we, pe_done;
  logic [4:0] pe_in_addr, pe_out_addr, tob_waddr;
  tile_ctrl dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stand-in adder tree: one-cycle valid delay
  always_ff @(posedge clk) at_out_valid <= at_valid;

  int loaded [NPE][ROWS];
  int run_len [NPE];
  int starts = 0, t = 0, t_start = 0, slowest = 0, exp_col = 0, writes = 0, last_col = -1;
  int seen_done_before_reduce = 1;
  always @(posedge clk) if (rst_n) begin
    t++;
    for (int p = 0; p < NPE; p++)
      if (pe_in_we[p]) begin
        loaded[p][pe_in_addr]++;
        if (int'(tib_raddr) != p * ROWS + int'(pe_in_addr)) begin
          failures++; $display("FAIL: PE %0d row %0d read word %0d", p, pe_in_addr, tib_raddr);
        end
      end
    if (pe_start) begin starts++; t_start = t; end
    pe_done <= '0;
    for (int p = 0; p < NPE; p++)
      if (starts > 0 && t == t_start + run_len[p]) pe_done[p] <= 1'b1;
    if (at_valid) begin
      if (t < t_start + slowest) seen_done_before_reduce = 0;
      if (int'(pe_out_addr) != exp_col) begin failures++; $display("FAIL: column %0d exp %0d", pe_out_addr, exp_col); end
      last_col = int'(pe_out_addr);
      exp_col++;
    end
    if (tob_we) begin
      writes++;
      if (int'(tob_waddr) != writes - 1) begin failures++; $display("FAIL: write column %0d", tob_waddr); end
    end
  end

  initial begin
    int lat;
    start = 0; pe_done = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      for (int p = 0; p < NPE; p++) begin
        run_len[p] = $urandom_range(400, 20);
        for (int r = 0; r < ROWS; r++) loaded[p][r] = 0;
      end
      slowest = 0;
      for (int p = 0; p < NPE; p++) if (run_len[p] > slowest) slowest = run_len[p];
      starts = 0; exp_col = 0; writes = 0; seen_done_before_reduce = 1;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      lat--;
      for (int p = 0; p < NPE; p++) for (int r = 0; r < ROWS; r++)
        chk(loaded[p][r] == 1, $sformatf("PE %0d row %0d loaded %0d times", p, r, loaded[p][r]));
      chk(starts == 1, "one PE start");
      chk(seen_done_before_reduce == 1, "reduction before the slowest PE finished");
      chk(exp_col == COLS && writes == COLS, $sformatf("columns %0d writes %0d", exp_col, writes));
      chk(lat == NPE * ROWS + 2 + slowest + COLS + 1,
          $sformatf("latency %0d exp %0d", lat, NPE * ROWS + 2 + slowest + COLS + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
