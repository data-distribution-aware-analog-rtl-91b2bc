// comparator: behavioural model of the SAR-ADC comparator. S_comp = 1 when
// V_in >= V_ref, else 0; ideal (no offset, no noise, no delay). Inputs are
// analog_t fixed-point voltages (see adc_pkg). This models an analog circuit;
// the architecture only names it, the decision convention (ties give 1) is
// this design's choice.
module comparator
  import adc_pkg::*;
(
  input  analog_t v_in,
  input  analog_t v_ref,
  output logic    s_comp
);
  assign s_comp = (v_in >= v_ref);
endmodule
