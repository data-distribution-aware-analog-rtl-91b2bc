// tb_tile_adder_tree: random inputs into an 8-input tree (default) and a
// 5-input tree; the registered sum must equal the sum of the inputs one
// cycle later, with out_valid following in_valid.
module tb_tile_adder_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic v8, ov8, v5, ov5;
  logic [12:0] in8 [8]; logic [15:0] out8;
  logic [6:0]  in5 [5]; logic [9:0]  out5;
  tile_adder_tree dut8 (.clk, .rst_n, .in_valid(v8), .in(in8), .out_valid(ov8), .out(out8));
  tile_adder_tree #(.N(5), .W(7)) dut5 (.clk, .rst_n, .in_valid(v5), .in(in5), .out_valid(ov5), .out(out5));
  initial begin
    int e8, e5;
    v8 = 0; v5 = 0;
    for (int k = 0; k < 8; k++) in8[k] = 0;
    for (int k = 0; k < 5; k++) in5[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) begin
      e8 = 0; e5 = 0;
      for (int k = 0; k < 8; k++) begin in8[k] = 13'($urandom); e8 += int'(in8[k]); end
      for (int k = 0; k < 5; k++) begin in5[k] = 7'($urandom); e5 += int'(in5[k]); end
      v8 = 1; v5 = 1;
      @(negedge clk);
      v8 = 0; v5 = 0;
      checks += 2;
      if (!ov8 || int'(out8) != e8) begin failures++; $display("FAIL: 8-input sum %0d exp %0d", out8, e8); end
      if (!ov5 || int'(out5) != e5) begin failures++; $display("FAIL: 5-input sum %0d exp %0d", out5, e5); end
      @(negedge clk);
      checks++;
      if (ov8 || ov5) begin failures++; $display("FAIL: out_valid without in_valid"); end
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
