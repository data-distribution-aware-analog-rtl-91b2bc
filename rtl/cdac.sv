// cdac: behavioural model of the capacitive DAC of the SAR-ADC. It turns the
// reference code S_ref into the reference voltage V_ref as a binary-weighted
// capacitor array does: every set bit i adds the charge share of its
// capacitor, nominally 2^i LSB. CAP_ERR[i] adds a per-capacitor error in
// analog_t units (1/256 LSB) so that mismatch can be studied; it is 0 by
// default, giving the ideal transfer V_ref = S_ref * V_LSB. V_ref settles
// within the clock cycle in which S_ref is presented. Voltages are analog_t
// fixed-point values (see adc_pkg). This is a model of an analog circuit,
// not synthesizable logic; the architecture only names the CDAC, the
// binary-weighted transfer is the textbook one.
module cdac
  import adc_pkg::*;
#(
  parameter int unsigned R = 5,
  parameter int CAP_ERR [16] = '{default: 0}
) (
  input  logic [R-1:0] s_ref,
  output analog_t      v_ref
);
  always_comb begin
    v_ref = '0;
    for (int i = 0; i < R; i++)
      if (s_ref[i]) v_ref = v_ref + analog_t'((longint'(1) << (i + ANA_FRAC)) + longint'(CAP_ERR[i]));
  end
endmodule
