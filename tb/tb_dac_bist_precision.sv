// tb_dac_bist_precision: test precision against clock period.
//
// One LSB gives TP counts when T = TP / f_LSB, so the resolution of a DNL
// measurement improves as 1/TP. A 4-bit DAC has code 8 raised by
// 0.1 LSB (DNL_8 = +0.1, DNL_9 = -0.1). The BIST is run with TP = 1, 10 and 40,
// the clock period being changed between runs, and the DNL stream is
// recorded. Each count carries up to one count of phase uncertainty at
// either end of its period, so a DNL value may be off by up to 2 counts,
// i.e. 2/TR LSB. Checked for every TP and every code: |measured - true| <=
// 2/TR (plus a small margin). At TP = 40 the 0.1 LSB step must also be seen
// as a positive DNL_8 and a negative DNL_9.
module tb_dac_bist_precision;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned K = 12;
  localparam int unsigned M = (1 << N) - 1;

  logic clock = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic [N-1:0] input_code = '0, dac_code, res_code, rd_addr = '0;
  real dac_vout, v_min, v_max;
  logic [7:0] dnl_thr = 8'hff, inl_thr = 8'hff, off_thr = 8'hff, gain_thr = 8'hff;
  logic res_valid;
  logic signed [K+N+2:0] dnl_s, off_s, gain_s;
  logic signed [K+2*N+2:0] inl_s;
  logic [K:0] full_scale;
  logic [K+N+2:0] max_abs_dnl_s;
  logic [K+2*N+2:0] max_abs_inl_s;
  logic [K-1:0] d_min, d_max, rd_data;
  logic nonmono, dnl_fail, inl_fail, off_fail, gain_fail, cal_fail, busy, done, pass;
  int checks = 0, failures = 0;
  real half_ns = 1000.0;

  dac_model #(.N(N)) u_dac (.code(dac_code), .offset_lsb(0.0), .gain_err(0.0), .bad_code(8), .bad_lsb(0.1),
                            .bow_lsb(0.0), .noise_lsb(0.0), .vout(dac_vout), .v_min, .v_max);

  dac_bist #(.N(N), .K(K)) dut (.*);

  initial forever begin #(half_ns); clock = ~clock; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run_tp(input real tp);
    real dnl[1 << N];
    real tr, tol, truth, worst;
    int cycles;
    // T = TP / f_LSB, f_LSB = 90 MHz / (2^N - 1)
    half_ns = 0.5 * tp * real'(M) / 90.0e6 * 1.0e9;
    repeat (2) @(negedge clock);
    test = 1'b1; cycles = 0;
    do begin
      @(negedge clock); cycles++;
      if (res_valid) dnl[res_code] = real'(dnl_s) / real'(full_scale);
    end while (!done && cycles < 100);
    chk(done, "done");
    tr  = real'(full_scale) / real'(M);
    tol = 2.0 / tr + 0.02;
    worst = 0.0;
    for (int i = 1; i <= int'(M); i++) begin
      truth = (i == 8) ? 0.1 : (i == 9) ? -0.1 : 0.0;
      chk(dnl[i] - truth <= tol && truth - dnl[i] <= tol, $sformatf("TP=%0.0f DNL_%0d = %f", tp, i, dnl[i]));
      if (dnl[i] - truth > worst) worst = dnl[i] - truth;
      if (truth - dnl[i] > worst) worst = truth - dnl[i];
    end
    $display("TP=%4.0f: T=%8.1f ns, TR=%6.2f counts/LSB, DNL_8=%7.3f DNL_9=%7.3f, worst error %0.3f LSB (bound %0.3f)",
             tp, 2.0 * half_ns, tr, dnl[8], dnl[9], worst, tol);
    if (tp >= 40.0) chk(dnl[8] > 0.0 && dnl[9] < 0.0, "0.1 LSB step resolved at TP = 40");
    @(negedge clock); test = 1'b0;
  endtask

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #3000 rst_n = 1'b1;
    run_tp(1.0);
    run_tp(10.0);
    run_tp(40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
