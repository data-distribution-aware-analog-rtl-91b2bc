// adc_pkg: types and constants shared by the reconfigurable SAR-ADC and the
// processing element around it.
//
// Analog quantities (wordline drive, bitline output, sample-and-hold value,
// CDAC reference) are carried between the behavioural analog models as
// unsigned fixed-point numbers, analog_t, in units of 1/2^ANA_FRAC of one
// ADC LSB. A bitline output of 12.5 LSB is therefore 12.5 * 256 = 3200.
// This representation is a modelling choice of this design, not circuit data.
//
// The configuration register map (cfg_addr_e) and the register field widths
// are this design's choices; the register names follow the architecture
// (RC_0, RC_1, R_Start_0, R_Step_0, R_Off_0, R_Start_1, R_Step_1).
package adc_pkg;

  // Fixed-point format of analog values.
  localparam int unsigned ANA_FRAC = 8;
  localparam int unsigned ANA_W    = 24;
  typedef logic [ANA_W-1:0] analog_t;

  // One ADC LSB expressed in analog_t units.
  localparam analog_t ANA_LSB = analog_t'(1) << ANA_FRAC;

  // Width of the N_start / N_step / N_off fields (covers ADCs up to 16 bits)
  // and of the cycle counters C_0 / C_1.
  localparam int unsigned PW    = 4;
  localparam int unsigned CNT_W = 8;
  localparam int unsigned CFG_W = 8;

  // Register map of the configurable register block.
  typedef enum logic [2:0] {
    CFG_RC0    = 3'd0,  // C_0: input-slice cycles run with the CMN set
    CFG_RC1    = 3'd1,  // C_1: input-slice cycles run with the CMB set
    CFG_START0 = 3'd2,  // N_start0 (CMN)
    CFG_STEP0  = 3'd3,  // N_step0  (CMN)
    CFG_OFF0   = 3'd4,  // N_off0   (CMN)
    CFG_START1 = 3'd5,  // N_start1 (CMB)
    CFG_STEP1  = 3'd6   // N_step1  (CMB)
  } cfg_addr_e;

  // Conversion method in force for a conversion.
  typedef enum logic {
    METHOD_CMN = 1'b0,  // conversion method for normal distributions
    METHOD_CMB = 1'b1   // conversion method for biased distributions
  } method_e;

  // Parameter set handed from the register MUX to the SAR logic.
  typedef struct packed {
    method_e       method;
    logic [PW-1:0] nstart;
    logic [PW-1:0] nstep;
    logic [PW-1:0] noff;
  } conv_params_t;

  // Phases of one conversion inside the SAR logic.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_CMN  = 2'd1,  // offset search below the CMN starting point
    PH_CMB  = 2'd2,  // high-order-zero prediction with roll-back
    PH_BS   = 2'd3   // binary search of the bits still unknown
  } sar_phase_e;

endpackage
