// tb_test_mux: self-checking test of the DAC input MUX with random codes:
// test = 0 must pass the normal code, test = 1 the pattern code.
module tb_test_mux;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 8;
  logic test;
  logic [N-1:0] normal_code, pattern_code, dac_code;
  int checks = 0, failures = 0;

  test_mux #(.N(N)) dut (.test, .normal_code, .pattern_code, .dac_code);

  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test = 1'($urandom_range(1));
      normal_code = N'($urandom); pattern_code = N'($urandom);
      #1;
      checks++;
      if (dac_code !== (test ? pattern_code : normal_code)) begin
        failures++; $display("FAIL test=%0b n=%0h p=%0h out=%0h", test, normal_code, pattern_code, dac_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
