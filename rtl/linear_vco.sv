// linear_vco: behavioural model of the linear voltage-controlled oscillator.
// Not synthesizable: it stands for an analogue block and uses real-valued
// ports and delays.
//
// The VCO input is one of three voltages, chosen by `sel` (the block diagram of the
// scheme shows the DAC output, V_min and V_max all reaching the VCO):
// VSEL_DAC -> v_dac, VSEL_MIN -> v_min, VSEL_MAX -> v_max. The output
// frequency is linear in that voltage:
//   f = F_MIN_HZ + (F_MAX_HZ - F_MIN_HZ) * (v - V_LO) / (V_HI - V_LO)
// i.e. K_VCO = (F_MAX_HZ - F_MIN_HZ) / (V_HI - V_LO), limited below at
// F_FLOOR_HZ. `osc` is a square wave whose phase integrates the
// frequency: when the input changes in the middle of a half period, the part
// already run is kept and the rest runs at the new frequency. A time-varying
// input (such as a noisy DAC output) is therefore averaged the way a real
// VCO averages it.
//
// The 10 MHz to 100 MHz range is the one the scheme uses in its 8-bit
// example; the 0 V to 3 V input range is an assumption of this model.
module linear_vco
  import dac_bist_pkg::*;
#(
  parameter real F_MIN_HZ   = 10.0e6,
  parameter real F_MAX_HZ   = 100.0e6,
  parameter real V_LO       = 0.0,
  parameter real V_HI       = 3.0,
  parameter real F_FLOOR_HZ = 1.0e3
) (
  input  real      v_dac,
  input  real      v_min,
  input  real      v_max,
  input  vco_sel_e sel,
  output logic     osc
);
  timeunit 1ns; timeprecision 1ps;

  real v_in, freq;

  always_comb begin
    unique case (sel)
      VSEL_MIN: v_in = v_min;
      VSEL_MAX: v_in = v_max;
      default:  v_in = v_dac;
    endcase
  end

  function automatic real freq_of(input real v);
    real f;
    f = F_MIN_HZ + (F_MAX_HZ - F_MIN_HZ) * (v - V_LO) / (V_HI - V_LO);
    return (f < F_FLOOR_HZ) ? F_FLOOR_HZ : f;
  endfunction

  // Phase is kept as the fraction of the current half period still to run.
  // The oscillator waits for whichever comes first, the end of the half
  // period at the present frequency or a change of the input voltage; on a
  // change it books the phase already run and continues at the new rate.
  real ph_left, t_start, dt;
  bit  timed_out;

  initial begin
    osc     = 1'b0;
    ph_left = 1.0;
    forever begin
      freq      = freq_of(v_in);
      t_start   = $realtime;
      dt        = ph_left * 0.5e9 / freq;  // ns
      timed_out = 1'b0;
      fork
        begin #(dt); timed_out = 1'b1; end
        @(v_in);
      join_any
      disable fork;
      if (timed_out) begin
        osc     = ~osc;
        ph_left = 1.0;
      end else begin
        ph_left = ph_left - ($realtime - t_start) * freq / 0.5e9;
        if (ph_left < 0.0) ph_left = 0.0;
      end
    end
  end
endmodule
