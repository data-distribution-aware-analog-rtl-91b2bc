// pe_ctrl: sequencer of a processing element. One matrix-vector product is
// done slice by slice: for every input slice s (least significant first) it
//   1. drives the DACs with slice s and samples all bitlines (DRIVE, one
//      cycle; the first ADC conversion is started at the same edge),
//   2. walks the column MUX over all COLS columns, starting the next
//      conversion in the cycle the previous one reports done, and hands
//      every result to the shift-and-add unit (CONV),
//   3. pulses slice_done to the ADC's switch counter (SLICE_END).
// At start it clears the output buffer and restarts the switch counter, so
// slice s of every vector uses the same conversion method.
//
// Timing: a conversion of k comparisons occupies k + 1 cycles (the ADC's
// done cycle is also the start cycle of the next column). With S_total
// comparisons over the whole product, done rises
// NSLICE * (COLS + 2) + S_total clock edges after the edge that takes start.
// A conventional SAR-ADC would have S_total = R * COLS * NSLICE.
// Statistics (comparisons and conversions by method) cover the last product
// and are cleared at start. This sequencing is this design's own; the
// architecture gives the parts of the PE, not their schedule.
module pe_ctrl
  import adc_pkg::*;
#(
  parameter int unsigned R      = 5,
  parameter int unsigned COLS   = 32,
  parameter int unsigned NSLICE = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // datapath control
  output logic [$clog2(NSLICE+1)-1:0] slice,
  output logic                        dac_en,
  output logic                        sh_sample,
  output logic [$clog2(COLS)-1:0]     col,
  output logic                        obuf_clear,
  output logic                        sa_valid,
  // ADC
  output logic                        adc_start,
  output logic                        adc_slice_clear,
  output logic                        adc_slice_done,
  input  logic                        adc_done,
  input  logic [$clog2(R+1)+1:0]      adc_steps,
  input  method_e                     adc_method,
  // statistics of the last product
  output logic [31:0]                 stat_steps,
  output logic [31:0]                 stat_cmn_convs,
  output logic [31:0]                 stat_cmb_convs
);

  typedef enum logic [1:0] {S_IDLE, S_DRIVE, S_CONV, S_SLICE_END} state_e;
  state_e state;

  localparam logic [$clog2(COLS)-1:0] LAST_COL = ($clog2(COLS))'(COLS - 1);
  localparam logic [$clog2(NSLICE+1)-1:0] LAST_SLICE = ($clog2(NSLICE+1))'(NSLICE - 1);

  always_comb begin
    busy            = (state != S_IDLE);
    dac_en          = (state == S_DRIVE);
    sh_sample       = (state == S_DRIVE);
    obuf_clear      = (state == S_IDLE) && start;
    adc_slice_clear = (state == S_IDLE) && start;
    adc_slice_done  = (state == S_SLICE_END);
    sa_valid        = (state == S_CONV) && adc_done;
    adc_start       = (state == S_DRIVE) ||
                      ((state == S_CONV) && adc_done && (col != LAST_COL));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      slice          <= '0;
      col            <= '0;
      done           <= 1'b0;
      stat_steps     <= '0;
      stat_cmn_convs <= '0;
      stat_cmb_convs <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            state          <= S_DRIVE;
            slice          <= '0;
            col            <= '0;
            stat_steps     <= '0;
            stat_cmn_convs <= '0;
            stat_cmb_convs <= '0;
          end
        S_DRIVE: begin
          state <= S_CONV;
          col   <= '0;
        end
        S_CONV:
          if (adc_done) begin
            stat_steps <= stat_steps + 32'(adc_steps);
            if (adc_method == METHOD_CMN) stat_cmn_convs <= stat_cmn_convs + 1;
            else                          stat_cmb_convs <= stat_cmb_convs + 1;
            if (col == LAST_COL) state <= S_SLICE_END;
            else                 col   <= col + 1'b1;
          end
        S_SLICE_END:
          if (slice == LAST_SLICE) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            slice <= slice + 1'b1;
            state <= S_DRIVE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE) |-> !start);

endmodule
