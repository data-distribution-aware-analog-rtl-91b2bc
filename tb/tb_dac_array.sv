// tb_dac_array: random input slices with the DACs enabled and disabled, for
// 1-bit (default) and 2-bit DACs; each wordline must carry code * V_READ, or
// 0 when disabled.
module tb_dac_array;
  import adc_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  logic [31:0][0:0] c1; analog_t v1 [32];
  logic [7:0][1:0]  c2; analog_t v2 [8];
  dac_array dut1 (.en, .codes(c1), .row_v(v1));
  dac_array #(.ROWS(8), .SW(2)) dut2 (.en, .codes(c2), .row_v(v2));
  initial begin
    repeat (200) begin
      en = 1'($urandom_range(3) != 0);
      c1 = {$urandom}; c2 = 16'($urandom);
      #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (v1[i] != (en ? analog_t'(c1[i]) * 256 : 0)) begin failures++; $display("FAIL: 1-bit row %0d", i); end
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (v2[i] != (en ? analog_t'(c2[i]) * 256 : 0)) begin failures++; $display("FAIL: 2-bit row %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
