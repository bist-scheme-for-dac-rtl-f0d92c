// dac_bist_core: synthesizable digital part of the DAC built-in self-test.
//
// The BIST checks a DAC without precision analogue instruments: the DAC
// output drives a linear VCO, and the number of VCO oscillations in one test
// clock period T (the index code D) is a digital measure of the output
// voltage. Sweeping every code and comparing successive counts gives
// monotonicity, offset, gain, DNL and INL with plain digital logic.
//
// This module holds everything digital: the controller (bist_ctrl), the
// pattern counter (TPG), the MUX in front of the DAC, the index counter, the
// four-register result store and the evaluation unit (DSP). The VCO and the
// DAC are outside: `vco_sel` tells the analogue side whether the DAC output,
// V_min or V_max is to drive the VCO, and `vco_osc` is the VCO output.
//
// Use: hold `test` low for normal operation (`input_code` goes to the DAC).
// Raise `test` and keep it high; after 2 + 2^N + IDX_LATENCY + 3 clock
// periods `done` is high and `pass` gives the verdict. Per-code DNL and INL
// stream out on `res_*`. Thresholds are in LSB with four fraction bits.
// With KEEP_ALL_CODES = 1 every index code D_i can be read back through
// `rd_addr` / `rd_data` after the test (one clock latency).
//
// The block structure follows the scheme's block diagram; how the blocks
// are sequenced and labelled is this design's choice (see the submodules).
module dac_bist_core
  import dac_bist_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 12,
  parameter bit          KEEP_ALL_CODES = 1'b0
) (
  input  logic                     clock,
  input  logic                     rst_n,
  input  logic                     test,
  input  logic [N-1:0]             input_code,
  output logic [N-1:0]             dac_code,
  output vco_sel_e                 vco_sel,
  input  logic                     vco_osc,
  input  logic [7:0]               dnl_thr,
  input  logic [7:0]               inl_thr,
  input  logic [7:0]               off_thr,
  input  logic [7:0]               gain_thr,
  output logic                     res_valid,
  output logic [N-1:0]             res_code,
  output logic signed [K+N+2:0]    dnl_s,
  output logic signed [K+2*N+2:0]  inl_s,
  output logic signed [K+N+2:0]    off_s,
  output logic signed [K+N+2:0]    gain_s,
  output logic [K:0]               full_scale,
  output logic [K+N+2:0]           max_abs_dnl_s,
  output logic [K+2*N+2:0]         max_abs_inl_s,
  output logic [K-1:0]             d_min,
  output logic [K-1:0]             d_max,
  input  logic [N-1:0]             rd_addr,
  output logic [K-1:0]             rd_data,
  output logic                     nonmono,
  output logic                     dnl_fail,
  output logic                     inl_fail,
  output logic                     off_fail,
  output logic                     gain_fail,
  output logic                     cal_fail,
  output logic                     busy,
  output logic                     done,
  output logic                     pass
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] pattern_code;
  logic         pattern_en, pattern_last, dsp_start;
  win_tag_t     tag_aligned;
  logic [K-1:0] d, d_i, d_i_1;
  logic         mem_valid, mem_first, mem_last;

  bist_ctrl u_ctrl (
    .clk(clock), .rst_n, .test,
    .pattern_first(pattern_code == '0), .pattern_last,
    .vco_sel, .pattern_en, .dsp_start, .tag_aligned, .busy
  );

  pattern_counter #(.N(N)) u_tpg (
    .clk(clock), .rst_n, .en(pattern_en), .code(pattern_code), .last(pattern_last)
  );

  test_mux #(.N(N)) u_mux (
    .test, .normal_code(input_code), .pattern_code, .dac_code
  );

  index_counter #(.K(K)) u_idx (
    .clk(clock), .rst_n, .osc(vco_osc), .d
  );

  bist_memory #(.N(N), .K(K), .KEEP_ALL_CODES(KEEP_ALL_CODES)) u_mem (
    .clk(clock), .rst_n, .d, .tag(tag_aligned),
    .d_min, .d_max, .d_i, .d_i_1,
    .code_valid(mem_valid), .first(mem_first), .last(mem_last),
    .rd_addr, .rd_data
  );

  bist_dsp #(.N(N), .K(K)) u_dsp (
    .clk(clock), .rst_n, .start(dsp_start),
    .code_valid(mem_valid), .first(mem_first), .last(mem_last),
    .d_min, .d_max, .d_i, .d_i_1,
    .dnl_thr, .inl_thr, .off_thr, .gain_thr,
    .res_valid, .res_code, .dnl_s, .inl_s, .off_s, .gain_s, .full_scale,
    .max_abs_dnl_s, .max_abs_inl_s,
    .nonmono, .dnl_fail, .inl_fail, .off_fail, .gain_fail, .cal_fail,
    .done, .pass
  );
endmodule
