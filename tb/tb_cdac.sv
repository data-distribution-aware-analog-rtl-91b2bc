// tb_cdac: every code of a 5-bit and of an 8-bit CDAC must give
// V_ref = code LSBs in the fixed-point analog format.
module tb_cdac;
  import adc_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] c5; analog_t v5;
  logic [7:0] c8; analog_t v8;
  cdac dut5 (.s_ref(c5), .v_ref(v5));
  cdac #(.R(8)) dut8 (.s_ref(c8), .v_ref(v8));
  initial begin
    for (int c = 0; c < 256; c++) begin
      c5 = 5'(c); c8 = 8'(c); #1;
      checks += 2;
      if (int'(v5) != (c % 32) * 256) begin failures++; $display("FAIL: R5 code %0d", c); end
      if (int'(v8) != c * 256) begin failures++; $display("FAIL: R8 code %0d", c); end
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
