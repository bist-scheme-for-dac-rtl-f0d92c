// bist_ctrl: sequencer of the DAC BIST.
//
// When `test` rises the controller runs the test procedure one clock period
// T per step:
//   CAL_MIN  one period with V_min applied to the VCO    -> D_min
//   CAL_MAX  one period with V_max applied to the VCO    -> D_max
//   SWEEP    2^N periods with the DAC output on the VCO while the pattern
//            counter steps through codes 0 .. 2^N-1      -> D_0 .. D_{2^N-1}
//   DONE     waits for `test` to fall
// Dropping `test` at any time returns it to IDLE (normal mode) and empties
// the label pipeline, so `test` must stay high until `done`.
//
// Every period is labelled (win_tag_t) with what it measures. The index
// counter delivers the count of a period IDX_LATENCY clock edges after it
// ends, so the label is delayed by IDX_LATENCY+1 registers and `tag_aligned`
// arrives together with that count. `dsp_start` is high while the
// controller is idle and `test` is high, so the evaluation unit is cleared
// at the same edge that starts calibration; results of a finished test stay
// readable after `test` falls, until the next test starts.
//
// Timing: with `test` sampled high at edge e0, CAL_MIN is the period after
// e0, CAL_MAX the next one, and code 0 is on the DAC in the period after
// that; codes then advance by one per rising clock edge. Calibrating before
// the sweep follows the scheme's test procedure; starting calibration from
// `test` and holding the MUX on the pattern path during it are this design's
// choices.
module bist_ctrl
  import dac_bist_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     test,
  input  logic     pattern_first,  // pattern counter holds code 0
  input  logic     pattern_last,   // pattern counter holds code 2^N-1
  output vco_sel_e vco_sel,
  output logic     pattern_en,
  output logic     dsp_start,
  output win_tag_t tag_aligned,
  output logic     busy
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_CAL_MIN = 3'd1,
    S_CAL_MAX = 3'd2,
    S_SWEEP   = 3'd3,
    S_DONE    = 3'd4
  } state_e;

  state_e   state, state_nxt;
  win_tag_t tag_now;
  win_tag_t tag_pipe [IDX_LATENCY+1];

  always_comb begin
    state_nxt = state;
    if (!test) state_nxt = S_IDLE;
    else begin
      unique case (state)
        S_IDLE:    state_nxt = S_CAL_MIN;
        S_CAL_MIN: state_nxt = S_CAL_MAX;
        S_CAL_MAX: state_nxt = S_SWEEP;
        S_SWEEP:   if (pattern_last) state_nxt = S_DONE;
        S_DONE:    state_nxt = S_DONE;
        default:   state_nxt = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nxt;
  end

  always_comb begin
    tag_now = '{kind: WIN_NONE, first: 1'b0, last: 1'b0};
    unique case (state)
      S_CAL_MIN: tag_now.kind = WIN_MIN;
      S_CAL_MAX: tag_now.kind = WIN_MAX;
      S_SWEEP:   tag_now = '{kind: WIN_CODE, first: pattern_first, last: pattern_last};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(IDX_LATENCY); i++)
        tag_pipe[i] <= '{kind: WIN_NONE, first: 1'b0, last: 1'b0};
    end else if (!test) begin
      // an aborted test must not leave labels in flight
      for (int i = 0; i <= int'(IDX_LATENCY); i++)
        tag_pipe[i] <= '{kind: WIN_NONE, first: 1'b0, last: 1'b0};
    end else begin
      tag_pipe[0] <= tag_now;
      for (int i = 1; i <= int'(IDX_LATENCY); i++) tag_pipe[i] <= tag_pipe[i-1];
    end
  end

  assign tag_aligned = tag_pipe[IDX_LATENCY];
  assign vco_sel     = (state == S_CAL_MIN) ? VSEL_MIN :
                       (state == S_CAL_MAX) ? VSEL_MAX : VSEL_DAC;
  assign pattern_en  = (state == S_SWEEP);
  assign dsp_start   = (state == S_IDLE) && test;
  assign busy        = (state != S_IDLE) && (state != S_DONE);
endmodule
