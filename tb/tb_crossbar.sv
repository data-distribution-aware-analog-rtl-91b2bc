// tb_crossbar: programs random conductance levels into an 8 x 4 crossbar of
// 2-bit cells and a default 32 x 32 crossbar of 1-bit cells, applies random
// wordline voltages and checks every bitline against the dot product
// computed here from the programmed levels.
module tb_crossbar;
  import adc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we_a; logic [2:0] row_a; logic [1:0] col_a; logic [1:0] lvl_a;
  analog_t rv_a [8]; analog_t bl_a [4];
  crossbar #(.ROWS(8), .COLS(4), .CELL_BITS(2)) dut_a (
    .clk, .w_we(we_a), .w_row(row_a), .w_col(col_a), .w_level(lvl_a), .row_v(rv_a), .bl(bl_a));

  logic we_b; logic [4:0] row_b, col_b; logic [0:0] lvl_b;
  analog_t rv_b [32]; analog_t bl_b [32];
  crossbar dut_b (
    .clk, .w_we(we_b), .w_row(row_b), .w_col(col_b), .w_level(lvl_b), .row_v(rv_b), .bl(bl_b));

  int ga [8][4];
  int gb [32][32];

  initial begin
    we_a = 0; we_b = 0;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 4; j++) begin
      ga[i][j] = $urandom_range(3);
      @(negedge clk); we_a = 1; row_a = 3'(i); col_a = 2'(j); lvl_a = 2'(ga[i][j]);
    end
    @(negedge clk) we_a = 0;
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      gb[i][j] = $urandom_range(1);
      @(negedge clk); we_b = 1; row_b = 5'(i); col_b = 5'(j); lvl_b = 1'(gb[i][j]);
    end
    @(negedge clk) we_b = 0;
    repeat (50) begin
      for (int i = 0; i < 8; i++)  rv_a[i] = analog_t'($urandom_range(4 * 256));
      for (int i = 0; i < 32; i++) rv_b[i] = analog_t'($urandom_range(1) * 256);
      #1;
      for (int j = 0; j < 4; j++) begin
        automatic int e = 0;
        for (int i = 0; i < 8; i++) e += int'(rv_a[i]) * ga[i][j];
        checks++;
        if (int'(bl_a[j]) != e) begin failures++; $display("FAIL: a bl%0d %0d exp %0d", j, bl_a[j], e); end
      end
      for (int j = 0; j < 32; j++) begin
        automatic int e = 0;
        for (int i = 0; i < 32; i++) e += int'(rv_b[i]) * gb[i][j];
        checks++;
        if (int'(bl_b[j]) != e) begin failures++; $display("FAIL: b bl%0d %0d exp %0d", j, bl_b[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
