// dac_model: behavioural model of an N-bit voltage DAC, used as the device
// under test in the BIST testbenches. Not synthesizable.
//
// Ideal transfer: V(code) = v_min + code * V_LSB, V_LSB = (VMAX-VMIN)/(2^N-1),
// so code 0 gives v_min and the full-scale code gives v_max. Errors can be
// added at run time (all in LSB):
//   offset_lsb  shift of every output
//   gain_err    relative slope error (0.01 = 1 %)
//   bad_code / bad_lsb   extra error on one single code
//   bow_lsb     parabolic INL bow, zero at both ends, bow_lsb at mid-scale
//   noise_lsb   uniform random noise of +/- noise_lsb, redrawn every
//               NOISE_STEP_NS nanoseconds
// v_min and v_max are the ideal references.
module dac_model #(
  parameter int unsigned N             = 8,
  parameter real         VMIN          = 0.0,
  parameter real         VMAX          = 3.0,
  parameter real         NOISE_STEP_NS = 10.0
) (
  input  logic [N-1:0] code,
  input  real          offset_lsb,
  input  real          gain_err,
  input  int           bad_code,
  input  real          bad_lsb,
  input  real          bow_lsb,
  input  real          noise_lsb,
  output real          vout,
  output real          v_min,
  output real          v_max
);
  timeunit 1ns; timeprecision 1ps;

  localparam real M     = real'((1 << N) - 1);
  localparam real V_LSB = (VMAX - VMIN) / M;

  real noise;  // in LSB, within [-1, 1] * noise_lsb

  initial begin
    noise = 0.0;
    forever begin
      #(NOISE_STEP_NS);
      noise = (real'($urandom_range(2000000)) / 1000000.0 - 1.0) * noise_lsb;
    end
  end

  always_comb begin
    real x, err;
    x   = real'(code) / M;
    err = offset_lsb + real'(code) * gain_err + bow_lsb * 4.0 * x * (1.0 - x) + noise;
    if (int'(code) == bad_code) err = err + bad_lsb;
    vout  = VMIN + (real'(code) + err) * V_LSB;
    v_min = VMIN;
    v_max = VMAX;
  end
endmodule
