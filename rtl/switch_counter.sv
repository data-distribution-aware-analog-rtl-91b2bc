// switch_counter: chooses which parameter set the SAR-ADC uses for the
// current input slice. Input slices are fed one per "cycle"; the first C_0
// cycles use set 0 (CMN, normal-shaped outputs), the next C_1 cycles set 1
// (CMB, biased outputs), and the pattern repeats. With C_0 = 5 and C_1 = 3 and
// eight input slices, slices 0-4 convert with CMN and slices 5-7 with CMB.
//
// The alternation between C_0 and C_1 periods follows the architecture. This
// design's choices: the count advances on slice_done (one pulse at the end of
// every input slice); clear (synchronous) restarts the pattern at slice 0,
// e.g. at the start of each new input vector; a period whose length is 0 is
// skipped, and if both are 0 the CMN set stays selected.
//
// Interface: sel is S_switch (0 = set 0 / CMN, 1 = set 1 / CMB), valid from
// the clock edge after clear or slice_done; cnt is the position inside the
// current period. rc0 and rc1 come from the configurable registers.
module switch_counter
  import adc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             slice_done,
  input  logic [CNT_W-1:0] rc0,
  input  logic [CNT_W-1:0] rc1,
  output method_e          sel,
  output logic [CNT_W-1:0] cnt
);

  logic [CNT_W-1:0] limit, other;
  always_comb begin
    limit = (sel == METHOD_CMB) ? rc1 : rc0;
    other = (sel == METHOD_CMB) ? rc0 : rc1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= METHOD_CMN;
      cnt <= '0;
    end else if (clear) begin
      sel <= (rc0 == '0 && rc1 != '0) ? METHOD_CMB : METHOD_CMN;
      cnt <= '0;
    end else if (slice_done) begin
      if ({1'b0, cnt} + 1'b1 >= {1'b0, limit}) begin
        cnt <= '0;
        if (other != '0) sel <= (sel == METHOD_CMB) ? METHOD_CMN : METHOD_CMB;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
