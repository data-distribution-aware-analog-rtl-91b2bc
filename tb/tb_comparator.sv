// tb_comparator: random and boundary voltage pairs; S_comp must be 1
// exactly when V_in >= V_ref.
module tb_comparator;
  import adc_pkg::*;
  int checks = 0, failures = 0;
  analog_t vin, vref; logic s;
  comparator dut (.v_in(vin), .v_ref(vref), .s_comp(s));
  task automatic one(int a, int b);
    vin = analog_t'(a); vref = analog_t'(b); #1;
    checks++;
    if (s != (a >= b)) begin failures++; $display("FAIL: %0d vs %0d gave %0d", a, b, s); end
  endtask
  initial begin
    one(0, 0); one(256, 256); one(255, 256); one(257, 256); one(0, 1); one(1, 0);
    repeat (2000) begin
      int a, b;
      a = $urandom_range(32 * 256);
      b = ($urandom_range(1)) ? a + $urandom_range(2) - 1 : $urandom_range(32 * 256);
      if (b < 0) b = 0;
      one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
