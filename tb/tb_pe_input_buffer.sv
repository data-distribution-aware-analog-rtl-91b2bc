// tb_pe_input_buffer: writes random activations and checks that slice s
// returns bits [s*SW +: SW] of every row, for SW = 1 (default) and SW = 2.
module tb_pe_input_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [4:0] waddr; logic [7:0] wdata;
  logic [3:0] slice1; logic [31:0][0:0] codes1;
  logic [2:0] slice2; logic [31:0][1:0] codes2;
  pe_input_buffer dut1 (.clk, .rst_n, .we, .waddr, .wdata, .slice(slice1), .codes(codes1));
  pe_input_buffer #(.SW(2)) dut2 (.clk, .rst_n, .we, .waddr, .wdata, .slice(slice2), .codes(codes2));
  int mem [32];
  initial begin
    we = 0; waddr = 0; wdata = 0; slice1 = 0; slice2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      for (int i = 0; i < 32; i++) begin
        mem[i] = $urandom_range(255);
        @(negedge clk); we = 1; waddr = 5'(i); wdata = 8'(mem[i]);
      end
      @(negedge clk) we = 0;
      for (int s = 0; s < 8; s++) begin
        slice1 = 4'(s); slice2 = 3'(s % 4); #1;
        for (int i = 0; i < 32; i++) begin
          checks += 2;
          if (int'(codes1[i]) != ((mem[i] >> s) & 1)) begin failures++; $display("FAIL: sw1 row %0d slice %0d", i, s); end
          if (int'(codes2[i]) != ((mem[i] >> (2 * (s % 4))) & 3)) begin failures++; $display("FAIL: sw2 row %0d", i); end
        end
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
