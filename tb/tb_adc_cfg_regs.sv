// tb_adc_cfg_regs: checks the reset values of the seven configuration
// registers, write and read-back of each, ignored writes outside the map,
// and the parameter MUX for both values of S_switch.
module tb_adc_cfg_regs;
  import adc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we; logic [2:0] addr; logic [CFG_W-1:0] wdata, rdata;
  method_e sel; logic [CNT_W-1:0] rc0, rc1; conv_params_t params;
  adc_cfg_regs dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_reg [8];
  task automatic check_all();
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a); #1;
      chk(int'(rdata) == exp_reg[a], $sformatf("read %0d = %0d exp %0d", a, rdata, exp_reg[a]));
    end
    chk(int'(rc0) == exp_reg[0] && int'(rc1) == exp_reg[1], "rc outputs");
    sel = METHOD_CMN; #1;
    chk(params.method == METHOD_CMN && int'(params.nstart) == exp_reg[2] &&
        int'(params.nstep) == exp_reg[3] && int'(params.noff) == exp_reg[4], "CMN set");
    sel = METHOD_CMB; #1;
    chk(params.method == METHOD_CMB && int'(params.nstart) == exp_reg[5] &&
        int'(params.nstep) == exp_reg[6] && params.noff == '0, "CMB set");
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0; sel = METHOD_CMN;
    exp_reg = '{5, 3, 1, 1, 1, 2, 1, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    repeat (40) begin
      int a, d;
      a = $urandom_range(7);
      d = (a < 2) ? $urandom_range(255) : $urandom_range(15);
      @(negedge clk); we = 1; addr = 3'(a); wdata = CFG_W'(d);
      @(negedge clk); we = 0;
      if (a < 7) exp_reg[a] = d;
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
