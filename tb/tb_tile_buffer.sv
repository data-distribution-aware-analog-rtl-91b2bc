// tb_tile_buffer: random writes into a 256 x 8 buffer (default) checked
// through the read port against a model array, including reset contents.
module tb_tile_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [7:0] waddr, raddr; logic [7:0] wdata, rdata;
  tile_buffer dut (.*);
  int m [256];
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 256; a++) m[a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      for (int a = 0; a < 256; a++) begin
        raddr = 8'(a); #1;
        checks++;
        if (int'(rdata) != m[a]) begin failures++; $display("FAIL: addr %0d = %0d exp %0d", a, rdata, m[a]); end
      end
      repeat (300) begin
        int a, d;
        a = $urandom_range(255); d = $urandom_range(255);
        @(negedge clk); we = 1; waddr = 8'(a); wdata = 8'(d); m[a] = d;
      end
      @(negedge clk) we = 0;
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
