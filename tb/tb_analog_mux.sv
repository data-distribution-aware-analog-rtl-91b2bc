// tb_analog_mux: every select value of a 32-input and a 5-input MUX must
// pass the chosen input; out-of-range selects of the 5-input MUX give 0.
module tb_analog_mux;
  import adc_pkg::*;
  int checks = 0, failures = 0;
  analog_t in32 [32]; analog_t o32; logic [4:0] s32;
  analog_t in5 [5];   analog_t o5;  logic [2:0] s5;
  analog_mux dut32 (.sel(s32), .in(in32), .out(o32));
  analog_mux #(.COLS(5)) dut5 (.sel(s5), .in(in5), .out(o5));
  initial begin
    repeat (20) begin
      for (int j = 0; j < 32; j++) in32[j] = analog_t'($urandom_range(1 << 20) + 1);
      for (int j = 0; j < 5; j++)  in5[j]  = analog_t'($urandom_range(1 << 20) + 1);
      for (int s = 0; s < 32; s++) begin
        s32 = 5'(s); s5 = 3'(s % 8); #1;
        checks += 2;
        if (o32 != in32[s]) begin failures++; $display("FAIL: sel %0d", s); end
        if (o5 != (((s % 8) < 5) ? in5[s % 8] : 0)) begin failures++; $display("FAIL: sel5 %0d", s % 8); end
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
