// tb_shift_add: accumulates random 5-bit codes over eight 1-bit slices for
// four columns, keeping the running sums in the testbench, and checks the
// written value, column and one-cycle latency against
// sum_s code(s) * 2^s.
module tb_shift_add;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic valid; logic [4:0] col; logic [3:0] slice; logic [4:0] value;
  logic [12:0] acc_in, wr_data; logic wr_en; logic [4:0] wr_col;
  shift_add dut (.*);
  int acc [4]; int expv [4];
  initial begin
    valid = 0; col = 0; slice = 0; value = 0; acc_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) begin
      for (int c = 0; c < 4; c++) begin acc[c] = 0; expv[c] = 0; end
      for (int s = 0; s < 8; s++)
        for (int c = 0; c < 4; c++) begin
          automatic int v = $urandom_range(31);
          expv[c] += v << s;
          valid = 1; col = 5'(c); slice = 4'(s); value = 5'(v); acc_in = 13'(acc[c]);
          @(negedge clk);
          valid = 0;
          checks++;
          if (!wr_en || wr_col != 5'(c) || int'(wr_data) != acc[c] + (v << s)) begin
            failures++; $display("FAIL: col %0d slice %0d got %0d", c, s, wr_data);
          end
          acc[c] = int'(wr_data);
          @(negedge clk);
          checks++;
          if (wr_en) begin failures++; $display("FAIL: wr_en without valid"); end
        end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (acc[c] != expv[c]) begin failures++; $display("FAIL: total col %0d", c); end
      end
    end
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
