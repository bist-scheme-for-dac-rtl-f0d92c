// tb_pattern_counter: self-checking test of the pattern counter (TPG).
// Checks reset value, +1 per rising clock edge while enabled, the `last`
// flag on the all-ones code, wrap-around, and clearing while disabled,
// against a reference count kept in the testbench.
module tb_pattern_counter;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] code;
  logic last;
  int checks = 0, failures = 0;
  int ref_code = 0;

  pattern_counter #(.N(N)) dut (.clk, .rst_n, .en, .code, .last);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: code=%0d ref=%0d last=%0b", what, code, ref_code, last); end
  endtask

  initial begin
    #1000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(code == 0, "reset");
    rst_n = 1'b1;
    @(negedge clk); en = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      ref_code = (ref_code + 1) % (1 << N);
      chk(code == N'(ref_code), "count");
      chk(last == (ref_code == (1 << N) - 1), "last");
      if (i == 20) begin en = 1'b0; @(negedge clk); ref_code = 0; chk(code == 0, "clear"); en = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
