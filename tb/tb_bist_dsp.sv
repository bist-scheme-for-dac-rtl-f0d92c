// tb_bist_dsp: self-checking test of the evaluation unit.
// Random calibration counts and code sweeps (near-linear, with random
// steps, dips and bows) are fed in as the result store would. Expected
// DNL, INL, offset and gain are computed in LSB with real arithmetic
// straight from the definitions (TR = (D_max - D_min) / (2^N - 1)) and
// compared with the unit's scaled outputs divided by R; the fail flags,
// the non-monotonic flag, done and pass are checked against thresholds.
module tb_bist_dsp;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned K = 10;
  localparam int unsigned M = (1 << N) - 1;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, code_valid = 1'b0, first = 1'b0, last = 1'b0;
  logic [K-1:0] d_min, d_max, d_i, d_i_1;
  logic [7:0] dnl_thr, inl_thr, off_thr, gain_thr;
  logic res_valid;
  logic [N-1:0] res_code;
  logic signed [K+N+2:0] dnl_s, off_s, gain_s;
  logic signed [K+2*N+2:0] inl_s;
  logic [K:0] full_scale;
  logic [K+N+2:0] max_abs_dnl_s;
  logic [K+2*N+2:0] max_abs_inl_s;
  logic nonmono, dnl_fail, inl_fail, off_fail, gain_fail, cal_fail, done, pass;
  int checks = 0, failures = 0;

  bist_dsp #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  // fail decision with ties skipped (they depend on rounding only)
  function automatic bit beyond(input real x, input real thr_lsb, output bit tie);
    real ax;
    ax  = (x < 0.0) ? -x : x;
    tie = near(ax, thr_lsb);
    return ax > thr_lsb;
  endfunction

  int D[1 << N];
  int run_nonmono_seen = 0, run_pass_seen = 0, run_fail_seen = 0;

  task automatic run(input int style);
    real tr, dnl, inl, off, gain, r, max_dnl, max_inl;
    bit e_nm, e_dnl, e_inl, e_off, e_gain, tie, any_tie;
    int dmin, dmax;
    dmin = 100 + $urandom_range(50);
    dmax = dmin + 150 + $urandom_range(60);
    for (int i = 0; i <= int'(M); i++) begin
      D[i] = dmin + (i * (dmax - dmin)) / int'(M);
      if (style >= 1) D[i] += $urandom_range(4) - 2;
      if (style == 2 && i == 7) D[i] -= 14;               // non-monotonic dip
      if (style == 3) D[i] += (i * (int'(M) - i)) / 4;     // bow
      if (style == 4) D[i] += 9;                          // offset
      if (D[i] < 0) D[i] = 0;
    end
    dnl_thr  = 8'($urandom_range(4, 24));
    inl_thr  = 8'($urandom_range(4, 40));
    off_thr  = 8'($urandom_range(4, 24));
    gain_thr = 8'($urandom_range(4, 24));
    r  = real'(dmax - dmin);
    tr = r / real'(M);
    @(negedge clk); start = 1'b1; d_min = K'(dmin); d_max = K'(dmax);
    @(negedge clk); start = 1'b0;
    chk(!done && !pass && !nonmono && !dnl_fail, "cleared by start");
    inl = 0.0; off = 0.0; gain = 0.0; max_dnl = 0.0; max_inl = 0.0;
    e_nm = 0; e_dnl = 0; e_inl = 0; e_off = 0; e_gain = 0; any_tie = 0;
    for (int i = 0; i <= int'(M); i++) begin
      d_i_1 = (i == 0) ? K'(0) : K'(D[i-1]);
      d_i = K'(D[i]); code_valid = 1'b1; first = (i == 0); last = (i == int'(M));
      @(negedge clk); code_valid = 1'b0; first = 1'b0; last = 1'b0;
      if (i == 0) begin
        off = real'(D[0] - dmin) / tr; dnl = 0.0;
        if (beyond(off, real'(off_thr) / 16.0, tie)) e_off = 1; any_tie |= tie;
      end else begin
        dnl = real'(D[i] - D[i-1]) / tr - 1.0;
        inl += dnl;
        if (D[i] < D[i-1]) e_nm = 1;
        if (beyond(dnl, real'(dnl_thr) / 16.0, tie)) e_dnl = 1; any_tie |= tie;
        if (beyond(inl, real'(inl_thr) / 16.0, tie)) e_inl = 1; any_tie |= tie;
        if ((dnl < 0 ? -dnl : dnl) > max_dnl) max_dnl = (dnl < 0 ? -dnl : dnl);
        if ((inl < 0 ? -inl : inl) > max_inl) max_inl = (inl < 0 ? -inl : inl);
      end
      chk(res_valid && res_code == N'(i), "result valid/code");
      chk(near(real'(dnl_s) / r, dnl), $sformatf("DNL code %0d: %f vs %f", i, real'(dnl_s) / r, dnl));
      chk(near(real'(inl_s) / r, inl), $sformatf("INL code %0d: %f vs %f", i, real'(inl_s) / r, inl));
    end
    gain = real'(D[M] - dmax) / tr - off;
    if (beyond(gain, real'(gain_thr) / 16.0, tie)) e_gain = 1; any_tie |= tie;
    chk(full_scale == (K+1)'(dmax - dmin), "full scale");
    chk(near(real'(off_s) / r, off), "offset value");
    chk(near(real'(gain_s) / r, gain), "gain value");
    chk(near(real'(max_abs_dnl_s) / r, max_dnl), "max |DNL|");
    chk(near(real'(max_abs_inl_s) / r, max_inl), "max |INL|");
    chk(done, "done");
    chk(nonmono == e_nm, "non-monotonic flag");
    if (!any_tie) begin
      chk(dnl_fail == e_dnl, "DNL flag");
      chk(inl_fail == e_inl, "INL flag");
      chk(off_fail == e_off, "offset flag");
      chk(gain_fail == e_gain, "gain flag");
      chk(pass == !(e_nm || e_dnl || e_inl || e_off || e_gain), "pass");
    end
    if (nonmono) run_nonmono_seen++;
    if (pass) run_pass_seen++; else run_fail_seen++;
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d_min = '0; d_max = '0; d_i = '0; d_i_1 = '0;
    dnl_thr = '0; inl_thr = '0; off_thr = '0; gain_thr = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 60; n++) run(n % 5);
    chk(run_nonmono_seen > 0 && run_pass_seen > 0 && run_fail_seen > 0, "coverage of outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
