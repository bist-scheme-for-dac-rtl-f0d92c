// tb_dac_bist_full: the DAC BIST at its default size on the 8-bit noise
// example: an 8-bit DAC, a linear VCO between 10 MHz and 100 MHz, test
// precision TP = 10, so T = 10 * 256 / 90 MHz = 28.44 us and the sweep of
// 256 codes takes 256 * T = 7.28 ms. The DAC is ideal apart from uniform
// random noise of +/- 2 LSB (redrawn every 10 ns). The VCO integrates the
// noise over each period, so the measured DNL of every code must stay
// within +/- 0.25 LSB (one count is about 0.1 LSB, so this allows the
// counting quantisation plus residual noise) and the test must pass with
// 0.5 LSB thresholds. A second sweep with a 0.6 LSB error on code 100,
// under the same noise, must be caught by the DNL check.
// Also checked: calibration counts against T*10 MHz and T*100 MHz, the
// 256 per-code results, and the sweep time.
module tb_dac_bist_full;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned K = 12;
  localparam real T_NS = 10.0 * 256.0 / 90.0e6 * 1.0e9;

  logic clock = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic [N-1:0] input_code = '0, dac_code, res_code;
  real dac_vout, v_min, v_max;
  logic [7:0] dnl_thr = 8'd8, inl_thr = 8'd8, off_thr = 8'd8, gain_thr = 8'd8;
  logic res_valid;
  logic signed [K+N+2:0] dnl_s, off_s, gain_s;
  logic signed [K+2*N+2:0] inl_s;
  logic [K:0] full_scale;
  logic [K+N+2:0] max_abs_dnl_s;
  logic [K+2*N+2:0] max_abs_inl_s;
  logic [K-1:0] d_min, d_max, rd_data;
  logic [N-1:0] rd_addr = '0;
  logic nonmono, dnl_fail, inl_fail, off_fail, gain_fail, cal_fail, busy, done, pass;
  int checks = 0, failures = 0;

  real offset_lsb = 0.0, gain_err = 0.0, bad_lsb = 0.0, bow_lsb = 0.0, noise_lsb = 2.0;
  int  bad_code = -1;

  dac_model #(.N(N), .NOISE_STEP_NS(10.0)) u_dac (
    .code(dac_code), .offset_lsb, .gain_err, .bad_code, .bad_lsb, .bow_lsb, .noise_lsb,
    .vout(dac_vout), .v_min, .v_max);

  dac_bist dut (.*);

  always #(T_NS / 2.0) clock = ~clock;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic sweep(input string name, output real worst_dnl, output int results);
    real t0, r, x;
    int cycles;
    worst_dnl = 0.0; results = 0; cycles = 0;
    @(negedge clock); test = 1'b1; t0 = $realtime;
    do begin
      @(negedge clock); cycles++;
      if (res_valid) begin
        results++;
        r = real'(full_scale);
        x = real'(dnl_s) / r;
        if (x < 0.0) x = -x;
        if (res_code != 0 && x > worst_dnl) worst_dnl = x;
      end
    end while (!done && cycles < 400);
    chk(cycles == 256 + 7, $sformatf("%s: clocks to done %0d", name, cycles));
    chk(results == 256, $sformatf("%s: %0d results", name, results));
    $display("%s: sweep time %0.3f ms, D_min=%0d D_max=%0d, offset %0.3f, gain %0.3f, max|DNL| %0.3f, max|INL| %0.3f LSB, pass=%0b",
             name, ($realtime - t0) * 1.0e-6, d_min, d_max, real'(off_s) / real'(full_scale),
             real'(gain_s) / real'(full_scale), worst_dnl, real'(max_abs_inl_s) / real'(full_scale), pass);
  endtask

  initial begin
    #(T_NS * 700.0); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real worst;
    int results;
    #(T_NS * 1.3) rst_n = 1'b1;
    sweep("noisy ideal DAC", worst, results);
    chk(d_min >= 283 && d_min <= 286, "D_min near T * 10 MHz = 284.4");
    chk(d_max >= 2843 && d_max <= 2846, "D_max near T * 100 MHz = 2844.4");
    chk(worst <= 0.25, $sformatf("noise suppressed: max |DNL| %f LSB", worst));
    chk(pass && !nonmono, "noisy ideal DAC passes");
    @(negedge clock); test = 1'b0;
    bad_code = 100; bad_lsb = 0.6;
    sweep("noisy DAC, code 100 +0.6 LSB", worst, results);
    chk(dnl_fail && !pass, "DNL error found under noise");
    chk(worst >= 0.45, $sformatf("DNL error size %f", worst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
