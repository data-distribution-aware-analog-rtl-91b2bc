// tb_pe_output_buffer: random writes checked through both read ports
// against a model array, and clear zeroing every word (also over a
// simultaneous write).
module tb_pe_output_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, wr_en; logic [4:0] wr_col, acc_col, rd_addr; logic [12:0] wr_data, acc_out, rd_data;
  pe_output_buffer dut (.*);
  int m [32];
  task automatic check_all();
    for (int a = 0; a < 32; a++) begin
      rd_addr = 5'(a); acc_col = 5'(31 - a); #1;
      checks += 2;
      if (int'(rd_data) != m[a]) begin failures++; $display("FAIL: rd %0d", a); end
      if (int'(acc_out) != m[31 - a]) begin failures++; $display("FAIL: acc %0d", 31 - a); end
    end
  endtask
  initial begin
    clear = 0; wr_en = 0; wr_col = 0; wr_data = 0; acc_col = 0; rd_addr = 0;
    for (int a = 0; a < 32; a++) m[a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) begin
      repeat (60) begin
        automatic int a = $urandom_range(31), d = $urandom_range(8191);
        @(negedge clk); wr_en = 1; wr_col = 5'(a); wr_data = 13'(d); m[a] = d;
      end
      @(negedge clk) wr_en = 0;
      check_all();
      @(negedge clk); clear = 1; wr_en = 1; wr_col = 3; wr_data = 77;
      @(negedge clk); clear = 0; wr_en = 0;
      for (int a = 0; a < 32; a++) m[a] = 0;
      check_all();
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
