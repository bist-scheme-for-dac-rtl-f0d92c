// tb_dac_bist: end-to-end test of the DAC BIST with its VCO model and a
// behavioural DAC (dac_model) at a reduced size, N = 4.
//
// The clock period is chosen as in the scheme, T = TP * 2^N / (F_MAX -
// F_MIN) with test precision TP = 10, so one LSB is about ten counts. The
// test runs the BIST on an ideal DAC and on DACs with each kind of error the
// scheme detects, and checks that exactly the expected flags rise and that
// the reported values (in LSB) are close to the injected errors:
//   ideal            -> pass
//   one code low     -> non-monotonic
//   offset +1 LSB    -> offset error, gain error stays near 0
//   slope +10 %      -> gain error
//   one code +0.85   -> DNL error, INL within limit
//   bow of 2 LSB     -> INL error, DNL within limit
// It also checks normal mode (test low passes input_code), the calibration
// counts against T*F_MIN and T*F_MAX, every stored D_i read back from the
// code memory (KEEP_ALL_CODES = 1), the number of clocks to done, and an
// aborted test. Every mechanism is counted; one that never happened counts
// as a failure.
module tb_dac_bist;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned K = 10;
  localparam int unsigned M = (1 << N) - 1;
  localparam real TP = 10.0;
  localparam real T_NS = TP * real'(1 << N) / 90.0e6 * 1.0e9;

  logic clock = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic [N-1:0] input_code, dac_code, res_code;
  real dac_vout, v_min, v_max;
  logic [7:0] dnl_thr = 8'd12, inl_thr = 8'd16, off_thr = 8'd8, gain_thr = 8'd8;
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

  real offset_lsb = 0.0, gain_err = 0.0, bad_lsb = 0.0, bow_lsb = 0.0, noise_lsb = 0.0;
  int  bad_code = -1;

  dac_model #(.N(N)) u_dac (.code(dac_code), .offset_lsb, .gain_err, .bad_code, .bad_lsb,
                            .bow_lsb, .noise_lsb, .vout(dac_vout), .v_min, .v_max);

  dac_bist #(.N(N), .K(K), .KEEP_ALL_CODES(1'b1)) dut (.*);

  always #(T_NS / 2.0) clock = ~clock;

  typedef enum int {MX_NORMAL, MX_CAL, MX_SWEEP, MX_PASS, MX_NONMONO, MX_OFFSET, MX_GAIN,
                    MX_DNL, MX_INL, MX_ABORT, MX_READBACK, MX_COUNT} mech_e;
  int seen[MX_COUNT];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit close_to(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic clear_faults();
    offset_lsb = 0.0; gain_err = 0.0; bad_code = -1; bad_lsb = 0.0; bow_lsb = 0.0; noise_lsb = 0.0;
  endtask

  // Run one BIST; return the number of clocks from test to done.
  task automatic run_bist(output int cycles, output int results);
    cycles = 0; results = 0;
    @(negedge clock); test = 1'b1;
    do begin
      @(negedge clock); cycles++;
      if (res_valid) results++;
    end while (!done && cycles < 200);
  endtask

  task automatic finish_bist();
    @(negedge clock); test = 1'b0;
    @(negedge clock);
  endtask

  task automatic scenario(input string name, input bit e_nm, input bit e_off, input bit e_gain,
                          input bit e_dnl, input bit e_inl);
    int cycles, results;
    real r, off, gain, mdnl, minl;
    run_bist(cycles, results);
    r    = real'(full_scale);
    off  = real'(off_s) / r;
    gain = real'(gain_s) / r;
    mdnl = real'(max_abs_dnl_s) / r;
    minl = real'(max_abs_inl_s) / r;
    $display("%-10s R=%0d offset=%6.3f gain=%6.3f max|DNL|=%6.3f max|INL|=%6.3f flags nm%0b off%0b gain%0b dnl%0b inl%0b pass%0b",
             name, full_scale, off, gain, mdnl, minl, nonmono, off_fail, gain_fail, dnl_fail, inl_fail, pass);
    chk(cycles == (1 << N) + 7, $sformatf("%s: clocks to done %0d", name, cycles));
    chk(results == (1 << N), $sformatf("%s: %0d results", name, results));
    chk(nonmono == e_nm, {name, ": non-monotonic flag"});
    chk(off_fail == e_off, {name, ": offset flag"});
    chk(gain_fail == e_gain, {name, ": gain flag"});
    chk(dnl_fail == e_dnl, {name, ": DNL flag"});
    chk(inl_fail == e_inl, {name, ": INL flag"});
    chk(!cal_fail, {name, ": calibration"});
    chk(pass == !(e_nm || e_off || e_gain || e_dnl || e_inl), {name, ": pass"});
    if (results == (1 << N)) seen[MX_SWEEP]++;
    if (pass) seen[MX_PASS]++;
    if (nonmono) seen[MX_NONMONO]++;
    if (off_fail) seen[MX_OFFSET]++;
    if (gain_fail) seen[MX_GAIN]++;
    if (dnl_fail) seen[MX_DNL]++;
    if (inl_fail) seen[MX_INL]++;
    // measured error sizes against injected ones (one count is ~0.1 LSB)
    chk(close_to(off, offset_lsb, 0.2), $sformatf("%s: offset %f", name, off));
    chk(close_to(gain, gain_err * real'(M), 0.25), $sformatf("%s: gain %f", name, gain));
    finish_bist();
  endtask

  initial begin
    #(T_NS * 2000.0); failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles, results;
    real f_lo_cnt, f_hi_cnt;
    input_code = '0;
    clear_faults();
    #(T_NS * 1.3) rst_n = 1'b1;
    // normal mode
    for (int i = 0; i < 10; i++) begin
      @(negedge clock); input_code = N'($urandom); #1;
      chk(dac_code == input_code, "normal mode passes input_code");
      if (dac_code == input_code) seen[MX_NORMAL]++;
    end
    // ideal DAC; calibration counts against T * f
    run_bist(cycles, results);
    f_lo_cnt = T_NS * 1.0e-9 * 10.0e6;
    f_hi_cnt = T_NS * 1.0e-9 * 100.0e6;
    chk(close_to(real'(d_min), f_lo_cnt, 1.0) && close_to(real'(d_max), f_hi_cnt, 1.0),
        $sformatf("calibration D_min=%0d (%f) D_max=%0d (%f)", d_min, f_lo_cnt, d_max, f_hi_cnt));
    if (close_to(real'(d_min), f_lo_cnt, 1.0) && close_to(real'(d_max), f_hi_cnt, 1.0)) seen[MX_CAL]++;
    finish_bist();
    scenario("ideal", 0, 0, 0, 0, 0);
    // the code memory holds D_i = T * f(V_i) for every code
    begin
      int ok_codes = 0;
      for (int i = 0; i <= int'(M); i++) begin
        real expd;
        rd_addr = N'(i);
        @(posedge clock); #1;
        expd = T_NS * 1.0e-9 * (10.0e6 + 90.0e6 * real'(i) / real'(M));
        chk(close_to(real'(rd_data), expd, 1.0), $sformatf("stored D_%0d = %0d, expected %f", i, rd_data, expd));
        if (close_to(real'(rd_data), expd, 1.0)) ok_codes++;
      end
      if (ok_codes == int'(M) + 1) seen[MX_READBACK]++;
    end
    bad_code = 5; bad_lsb = -1.5;
    scenario("nonmono", 1, 0, 0, 1, 1);
    clear_faults(); offset_lsb = 1.0;
    scenario("offset", 0, 1, 0, 0, 0);
    clear_faults(); gain_err = 0.1 / real'(M);
    scenario("gain", 0, 0, 0, 0, 0);
    clear_faults(); gain_err = 1.5 / real'(M);
    scenario("gain+", 0, 0, 1, 0, 1);
    clear_faults(); bad_code = 8; bad_lsb = 0.85;
    scenario("dnl", 0, 0, 0, 1, 0);
    clear_faults(); bow_lsb = 2.0;
    scenario("inl", 0, 0, 0, 0, 1);
    clear_faults();
    // abort: drop test in the middle of the sweep
    @(negedge clock); test = 1'b1;
    repeat (8) @(negedge clock);
    chk(busy, "abort: sweep running");
    test = 1'b0;
    @(negedge clock);
    chk(!busy && !done && dac_code == input_code, "abort: back to normal mode");
    if (!busy && !done) seen[MX_ABORT]++;
    // after an abort a full test still works
    scenario("ideal2", 0, 0, 0, 0, 0);
    for (int m = 0; m < int'(MX_COUNT); m++) begin
      chk(seen[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-11s seen %0d times", mech_e'(m), seen[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
