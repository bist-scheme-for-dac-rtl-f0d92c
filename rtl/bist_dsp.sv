// bist_dsp: evaluation unit of the DAC BIST.
//
// From the index codes it computes, for an N-bit DAC,
//   non-monotonicity : flagged when D_i < D_{i-1}
//   offset error     : (D_0 - D_min) / TR
//   gain error       : (D_{2^N-1} - D_max) / TR - offset error
//   DNL_i            : (D_i - D_{i-1}) / TR - 1
//   INL_i            : DNL_1 + ... + DNL_i
// and compares each with a threshold; `pass` is high when the sweep is done
// and nothing was outside its threshold.
//
// TR is the count of one LSB. This design takes it from the calibration:
// TR = R / M with R = D_max - D_min and M = 2^N - 1 (the ideal DAC gives V_min
// at code 0 and V_max at code 2^N-1). To avoid a divider every result is
// reported multiplied by R ("scaled" values, unit LSB * R):
//   dnl_s  = (D_i - D_{i-1}) * M - R          = DNL_i * R
//   inl_s  = sum of dnl_s                     = INL_i * R
//   off_s  = (D_0 - D_min) * M                = offset * R
//   gain_s = (D_last - D_max) * M - off_s     = gain * R
// A check fails when |x_s| * 2^THR_FRAC > thr * R, where thr is the
// threshold in LSB with THR_FRAC (=4) fraction bits. Multiplying by the
// constant M is a shift and a subtraction.
//
// Interface and timing: `start` (one clock) clears all results and flags.
// Each `code_valid` from the store is processed in one clock; `res_valid`,
// `dnl_s`, `inl_s` and `res_code` follow one clock later. After the code
// with `last`, `done` goes high and stays high until the next `start`.
// DNL is not defined for code 0: `dnl_s` is 0 there and INL_0 = 0.
//
// The formulas and the threshold comparison follow the scheme; reading TR
// from the calibration counts, the scaled arithmetic, the threshold format
// and the extra outputs (maxima, code index) are this design's choices.
module bist_dsp
  import dac_bist_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                code_valid,
  input  logic                first,
  input  logic                last,
  input  logic [K-1:0]        d_min,
  input  logic [K-1:0]        d_max,
  input  logic [K-1:0]        d_i,
  input  logic [K-1:0]        d_i_1,
  input  logic [7:0]          dnl_thr,   // LSB, THR_FRAC fraction bits
  input  logic [7:0]          inl_thr,
  input  logic [7:0]          off_thr,
  input  logic [7:0]          gain_thr,
  output logic                res_valid,
  output logic [N-1:0]        res_code,
  output logic signed [K+N+2:0]   dnl_s,
  output logic signed [K+2*N+2:0] inl_s,
  output logic signed [K+N+2:0]   off_s,
  output logic signed [K+N+2:0]   gain_s,
  output logic [K:0]          full_scale,  // R = D_max - D_min
  output logic [K+N+2:0]      max_abs_dnl_s,
  output logic [K+2*N+2:0]    max_abs_inl_s,
  output logic                nonmono,
  output logic                dnl_fail,
  output logic                inl_fail,
  output logic                off_fail,
  output logic                gain_fail,
  output logic                cal_fail,
  output logic                done,
  output logic                pass
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W  = K + N + 3;        // DNL, offset, gain
  localparam int unsigned WI = K + 2 * N + 3;    // INL
  localparam int unsigned CW = WI + THR_FRAC + 2; // comparisons
  localparam int unsigned M  = (1 << N) - 1;

  typedef logic signed [W-1:0]  sw_t;
  typedef logic signed [WI-1:0] swi_t;
  typedef logic signed [CW-1:0] cw_t;

  sw_t  r_s, delta, dnl_c, off_c, gain_c;
  swi_t inl_c;

  // |x| * 2^THR_FRAC > thr * R
  function automatic logic over(input cw_t x, input logic [7:0] thr, input sw_t r);
    cw_t ax, lim;
    ax  = (x < 0) ? -x : x;
    lim = cw_t'($signed({1'b0, thr})) * cw_t'(r);
    return (ax <<< THR_FRAC) > lim;
  endfunction

  always_comb begin
    r_s    = sw_t'($signed({1'b0, d_max})) - sw_t'($signed({1'b0, d_min}));
    delta  = sw_t'($signed({1'b0, d_i})) - sw_t'($signed({1'b0, d_i_1}));
    dnl_c  = delta * sw_t'(M) - r_s;
    inl_c  = inl_s + swi_t'(dnl_c);
    off_c  = (sw_t'($signed({1'b0, d_i})) - sw_t'($signed({1'b0, d_min}))) * sw_t'(M);
    gain_c = (sw_t'($signed({1'b0, d_i})) - sw_t'($signed({1'b0, d_max}))) * sw_t'(M) - off_s;
  end

  assign full_scale = r_s[K:0];
  assign pass = done && !(nonmono || dnl_fail || inl_fail || off_fail || gain_fail || cal_fail);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid     <= 1'b0;
      res_code      <= '0;
      dnl_s         <= '0;
      inl_s         <= '0;
      off_s         <= '0;
      gain_s        <= '0;
      max_abs_dnl_s <= '0;
      max_abs_inl_s <= '0;
      nonmono       <= 1'b0;
      dnl_fail      <= 1'b0;
      inl_fail      <= 1'b0;
      off_fail      <= 1'b0;
      gain_fail     <= 1'b0;
      cal_fail      <= 1'b0;
      done          <= 1'b0;
    end else if (start) begin
      res_valid     <= 1'b0;
      res_code      <= '0;
      dnl_s         <= '0;
      inl_s         <= '0;
      off_s         <= '0;
      gain_s        <= '0;
      max_abs_dnl_s <= '0;
      max_abs_inl_s <= '0;
      nonmono       <= 1'b0;
      dnl_fail      <= 1'b0;
      inl_fail      <= 1'b0;
      off_fail      <= 1'b0;
      gain_fail     <= 1'b0;
      cal_fail      <= 1'b0;
      done          <= 1'b0;
    end else begin
      res_valid <= code_valid;
      if (code_valid) begin
        if (first) begin
          res_code <= '0;
          dnl_s    <= '0;
          inl_s    <= '0;
          off_s    <= off_c;
          if (r_s <= 0) cal_fail <= 1'b1;
          if (over(cw_t'(off_c), off_thr, r_s)) off_fail <= 1'b1;
        end else begin
          res_code <= res_code + 1'b1;
          dnl_s    <= dnl_c;
          inl_s    <= inl_c;
          if (d_i < d_i_1) nonmono <= 1'b1;
          if (over(cw_t'(dnl_c), dnl_thr, r_s)) dnl_fail <= 1'b1;
          if (over(cw_t'(inl_c), inl_thr, r_s)) inl_fail <= 1'b1;
          if ((dnl_c < 0 ? -dnl_c : dnl_c) > sw_t'(max_abs_dnl_s))
            max_abs_dnl_s <= (dnl_c < 0 ? -dnl_c : dnl_c);
          if ((inl_c < 0 ? -inl_c : inl_c) > swi_t'(max_abs_inl_s))
            max_abs_inl_s <= (inl_c < 0 ? -inl_c : inl_c);
        end
        if (last) begin
          gain_s <= gain_c;
          if (over(cw_t'(gain_c), gain_thr, r_s)) gain_fail <= 1'b1;
          done   <= 1'b1;
        end
      end
    end
  end
endmodule
