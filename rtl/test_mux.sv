// test_mux: input selector in front of the DAC under test.
//
// With `test` low the DAC receives the normal functional code `normal_code`
// (input 0); with `test` high it receives the test pattern `pattern_code`
// from the pattern counter (input 1). Purely combinational, N bits wide.
// The input numbering follows the scheme's block diagram.
module test_mux #(
  parameter int unsigned N = 8
) (
  input  logic         test,
  input  logic [N-1:0] normal_code,
  input  logic [N-1:0] pattern_code,
  output logic [N-1:0] dac_code
);
  timeunit 1ns; timeprecision 1ps;

  always_comb dac_code = test ? pattern_code : normal_code;
endmodule
