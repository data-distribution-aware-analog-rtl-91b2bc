// tb_sample_hold: values must be captured on a sampling edge and held,
// unchanged while the inputs move, until the next sampling edge.
module tb_sample_hold;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sample; analog_t bl [8]; analog_t held [8]; analog_t exp_v [8];
  sample_hold #(.COLS(8)) dut (.*);
  initial begin
    sample = 0;
    for (int j = 0; j < 8; j++) begin bl[j] = 0; exp_v[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (100) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) bl[j] = analog_t'($urandom_range(1 << 16));
      sample = 1'($urandom_range(2) == 0);
      if (sample) exp_v = bl;
      @(negedge clk);
      sample = 0;
      for (int j = 0; j < 8; j++) bl[j] = analog_t'($urandom_range(1 << 16));
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (held[j] != exp_v[j]) begin failures++; $display("FAIL: col %0d", j); end
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
