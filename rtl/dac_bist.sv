// dac_bist: the DAC built-in self-test with its linear VCO.
//
// Top level of the scheme. It joins the synthesizable digital part
// (dac_bist_core: controller, pattern counter, MUX, index counter, result
// registers, evaluation unit) with the behavioural model of the linear VCO.
// The DAC under test is outside: it receives `dac_code` and returns its
// output voltage `dac_vout` and its two reference voltages `v_min` and
// `v_max`, all as real values. Because of the VCO model this level is for
// simulation; for synthesis use dac_bist_core and a real VCO.
//
// Operation: with `test` low, `input_code` goes straight to the DAC. Raising
// `test` runs calibration (one period T each on V_min and V_max), then sweeps
// all 2^N codes, one per clock period, and evaluates monotonicity, offset,
// gain, DNL and INL. `done` rises 2^N + 7 clock periods after `test` was
// first sampled high; `pass` then gives the verdict. The clock period sets
// the test precision: with T = TP / (K_VCO * V_LSB) one LSB is TP counts.
// K must hold T * F_MAX_HZ.
module dac_bist
  import dac_bist_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned K        = 12,
  parameter real         F_MIN_HZ = 10.0e6,
  parameter real         F_MAX_HZ = 100.0e6,
  parameter real         V_LO     = 0.0,
  parameter real         V_HI     = 3.0,
  parameter bit          KEEP_ALL_CODES = 1'b0
) (
  input  logic                     clock,
  input  logic                     rst_n,
  input  logic                     test,
  input  logic [N-1:0]             input_code,
  output logic [N-1:0]             dac_code,
  input  real                      dac_vout,
  input  real                      v_min,
  input  real                      v_max,
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

  vco_sel_e vco_sel;
  logic     vco_osc;

  linear_vco #(
    .F_MIN_HZ(F_MIN_HZ), .F_MAX_HZ(F_MAX_HZ), .V_LO(V_LO), .V_HI(V_HI)
  ) u_vco (
    .v_dac(dac_vout), .v_min, .v_max, .sel(vco_sel), .osc(vco_osc)
  );

  dac_bist_core #(.N(N), .K(K), .KEEP_ALL_CODES(KEEP_ALL_CODES)) u_core (
    .clock, .rst_n, .test, .input_code, .dac_code, .vco_sel, .vco_osc,
    .dnl_thr, .inl_thr, .off_thr, .gain_thr,
    .res_valid, .res_code, .dnl_s, .inl_s, .off_s, .gain_s, .full_scale,
    .max_abs_dnl_s, .max_abs_inl_s, .d_min, .d_max, .rd_addr, .rd_data,
    .nonmono, .dnl_fail, .inl_fail, .off_fail, .gain_fail, .cal_fail,
    .busy, .done, .pass
  );
endmodule
