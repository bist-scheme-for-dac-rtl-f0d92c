// dac_bist_pkg: types and constants shared by the DAC BIST blocks.
//
// The BIST measures a DAC by letting its output voltage steer a linear VCO and
// counting VCO oscillations over one test clock period T. Each such period is a
// "counting window". The controller labels every window with what was applied
// to the VCO during it (V_min, V_max or one DAC code); the label travels down a
// short pipeline so that it arrives together with the count of that window.
package dac_bist_pkg;
  timeunit 1ns; timeprecision 1ps;

  // What the VCO input selector applies: DAC output, V_min or V_max.
  typedef enum logic [1:0] {
    VSEL_DAC = 2'd0,
    VSEL_MIN = 2'd1,
    VSEL_MAX = 2'd2
  } vco_sel_e;

  // What a counting window measured.
  typedef enum logic [1:0] {
    WIN_NONE = 2'd0,  // nothing of interest (idle, normal mode)
    WIN_MIN  = 2'd1,  // calibration with V_min applied -> D_min
    WIN_MAX  = 2'd2,  // calibration with V_max applied -> D_max
    WIN_CODE = 2'd3   // DAC driven with test code C_i -> D_i
  } win_kind_e;

  typedef struct packed {
    win_kind_e kind;
    logic      first;  // WIN_CODE window of code 0
    logic      last;   // WIN_CODE window of code 2^n-1
  } win_tag_t;

  // Clock edges between the end of a counting window and the edge after
  // which the index counter presents that window's count (two synchroniser
  // stages, then the difference register).
  localparam int unsigned IDX_LATENCY = 2;

  // Thresholds are given in LSB with this many fraction bits.
  localparam int unsigned THR_FRAC = 4;
endpackage
