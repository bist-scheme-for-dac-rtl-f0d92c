// pattern_counter: test pattern generator (TPG) of the DAC BIST.
//
// An N-bit binary counter that supplies the DAC test codes C_0, C_1, ...,
// C_{2^N-1}. While `en` is high it is increased by 1 at each rising edge of
// the test clock, so each code is held for exactly one clock period T, as in
// the timing diagram of the scheme. While `en` is low it is held at 0, so a
// sweep always starts at code 0 in the first period after `en` rises.
// `last` is high while the counter holds the all-ones code.
//
// Counting by one per rising clock edge follows the scheme; clearing to zero
// while disabled and the `last` flag are choices of this design.
module pattern_counter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] code,
  output logic         last
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   code <= '0;
    else if (en)  code <= code + 1'b1;
    else          code <= '0;
  end

  assign last = &code;
endmodule
