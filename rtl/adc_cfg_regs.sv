// adc_cfg_regs: configurable registers of the reconfigurable SAR-ADC and the
// multiplexers that hand the parameter set in force to the SAR logic.
//
// Registers (names of the architecture, addresses of this design):
//   RC_0 (0)      C_0, slices per CMN period      reset 5
//   RC_1 (1)      C_1, slices per CMB period      reset 3
//   R_Start_0 (2) N_start0 of CMN                 reset 1
//   R_Step_0 (3)  N_step0 of CMN                  reset 1
//   R_Off_0 (4)   N_off0 of CMN                   reset 1
//   R_Start_1 (5) N_start1 of CMB                 reset 2
//   R_Step_1 (6)  N_step1 of CMB                  reset 1
// The reset values are the settings of the worked examples of the two
// methods and of the switching example; in use they are loaded with the
// results of the offline parameter search. CMB has no offset register, so
// its parameter set carries N_off = 0.
//
// Interface: a write (we = 1) takes effect at the clock edge; writes to an
// address outside the map are ignored. rdata reads the addressed register
// combinationally (0 outside the map). sel (S_switch) selects set 0 or set 1;
// params and the cycle counts are combinational outputs.
module adc_cfg_regs
  import adc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [2:0]       addr,
  input  logic [CFG_W-1:0] wdata,
  output logic [CFG_W-1:0] rdata,
  input  method_e          sel,
  output logic [CNT_W-1:0] rc0,
  output logic [CNT_W-1:0] rc1,
  output conv_params_t     params
);

  logic [PW-1:0] start0, step0, off0, start1, step1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc0    <= CNT_W'(5);
      rc1    <= CNT_W'(3);
      start0 <= PW'(1);
      step0  <= PW'(1);
      off0   <= PW'(1);
      start1 <= PW'(2);
      step1  <= PW'(1);
    end else if (we) begin
      case (addr)
        CFG_RC0:    rc0    <= wdata[CNT_W-1:0];
        CFG_RC1:    rc1    <= wdata[CNT_W-1:0];
        CFG_START0: start0 <= wdata[PW-1:0];
        CFG_STEP0:  step0  <= wdata[PW-1:0];
        CFG_OFF0:   off0   <= wdata[PW-1:0];
        CFG_START1: start1 <= wdata[PW-1:0];
        CFG_STEP1:  step1  <= wdata[PW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    case (addr)
      CFG_RC0:    rdata = CFG_W'(rc0);
      CFG_RC1:    rdata = CFG_W'(rc1);
      CFG_START0: rdata = CFG_W'(start0);
      CFG_STEP0:  rdata = CFG_W'(step0);
      CFG_OFF0:   rdata = CFG_W'(off0);
      CFG_START1: rdata = CFG_W'(start1);
      CFG_STEP1:  rdata = CFG_W'(step1);
      default:    rdata = '0;
    endcase
  end

  // Parameter MUX driven by S_switch.
  always_comb begin
    params.method = sel;
    if (sel == METHOD_CMB) begin
      params.nstart = start1;
      params.nstep  = step1;
      params.noff   = '0;
    end else begin
      params.nstart = start0;
      params.nstep  = step0;
      params.noff   = off0;
    end
  end

endmodule
