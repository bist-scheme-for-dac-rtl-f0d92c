// tb_linear_vco: self-checking test of the linear VCO model.
// For each input selection and several voltages the testbench counts
// rising edges of `osc` over 20 us and compares the count with
// f * 20 us from the linear law f = F_MIN + (F_MAX - F_MIN) * v / 3 V
// (tolerance one edge).
module tb_linear_vco;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  real v_dac = 0.0, v_min = 0.0, v_max = 3.0;
  vco_sel_e sel = VSEL_DAC;
  logic osc;
  int checks = 0, failures = 0;
  int edges = 0;

  linear_vco dut (.v_dac, .v_min, .v_max, .sel, .osc);

  always @(posedge osc) edges++;

  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input vco_sel_e s, input real v);
    real f, expv;
    int e0;
    sel = s;
    if (s == VSEL_DAC) v_dac = v;
    #1000;  // let the new frequency settle for one half period
    e0 = edges;
    #20000;
    f = 10.0e6 + 90.0e6 * v / 3.0;
    expv = f * 20.0e-6;
    checks++;
    if ((real'(edges - e0) - expv) > 1.01 || (expv - real'(edges - e0)) > 1.01) begin
      failures++; $display("FAIL sel=%0d v=%f edges=%0d expected=%f", s, v, edges - e0, expv);
    end
  endtask

  initial begin
    measure(VSEL_MIN, 0.0);
    measure(VSEL_MAX, 3.0);
    for (int i = 0; i < 8; i++) measure(VSEL_DAC, real'(i) * 0.4 + 0.05);
    v_min = 1.0; measure(VSEL_MIN, 1.0);
    v_max = 2.5; measure(VSEL_MAX, 2.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
