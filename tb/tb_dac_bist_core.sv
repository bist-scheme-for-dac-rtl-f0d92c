// tb_dac_bist_core: self-checking test of the digital BIST core.
// The testbench plays the analogue side: its own oscillator runs at a
// frequency set by `vco_sel` and `dac_code` (an ideal linear DAC plus an
// optional error on one code). It counts that oscillator's edges in every
// clock period itself and notes what was applied in the period. From these
// counts it computes D_min, D_max, DNL, INL, offset and gain in LSB and
// checks every per-code result the core streams out, the calibration
// registers, the flags, pass, and the number of clocks from `test` to
// `done` (2^N + 7), and reads every stored D_i back from the code memory
// (KEEP_ALL_CODES = 1). Normal mode (test low) must pass input_code through.
module tb_dac_bist_core;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 4;
  localparam int unsigned K = 9;
  localparam int unsigned M = (1 << N) - 1;
  localparam real T_NS = 1000.0;

  logic clock = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic [N-1:0] input_code, dac_code, res_code;
  vco_sel_e vco_sel;
  logic vco_osc = 1'b0;
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

  dac_bist_core #(.N(N), .K(K), .KEEP_ALL_CODES(1'b1)) dut (.*);

  // ---- analogue side of the testbench ----
  int  bad_code = -1;
  real bad_lsb = 0.0;
  real volt, freq;
  always_comb begin
    unique case (vco_sel)
      VSEL_MIN: volt = 0.0;
      VSEL_MAX: volt = 3.0;
      default:  volt = (real'(dac_code) + ((int'(dac_code) == bad_code) ? bad_lsb : 0.0)) * 3.0 / real'(M);
    endcase
    freq = 10.0e6 + 90.0e6 * volt / 3.0;
  end
  initial forever begin #(0.5e9 / freq + 0.0007); vco_osc = ~vco_osc; end

  always #(T_NS / 2.0) clock = ~clock;

  // ---- reference measurement ----
  int edges = 0, snap = 0;
  int ref_min = 0, ref_max = 0;
  int ref_d[1 << N];
  vco_sel_e sel_in_period;
  logic pat_in_period;
  logic [N-1:0] code_in_period;
  always @(posedge vco_osc) edges++;
  always @(posedge clock) begin
    if (busy) begin
      if (vco_sel == VSEL_MIN) ref_min = edges - snap;
      else if (vco_sel == VSEL_MAX) ref_max = edges - snap;
      else if (dut.pattern_en) ref_d[dac_code] = edges - snap;
    end
    snap = edges;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  task automatic run(input int bc, input real bl, input bit expect_nonmono);
    int cycles;
    real tr, r, dnl, inl, off, gain;
    bit e_fail;
    real dnl_got[1 << N], inl_got[1 << N];
    bad_code = bc; bad_lsb = bl;
    @(negedge clock); test = 1'b1; cycles = 0;
    fork
      begin
        do begin @(negedge clock); cycles++; end while (!done);
      end
      begin
        forever begin
          @(posedge clock);
          #1 if (res_valid) begin
            dnl_got[res_code] = real'(dnl_s); inl_got[res_code] = real'(inl_s);
          end
        end
      end
    join_any
    disable fork;
    chk(cycles == (1 << N) + 7, $sformatf("clocks from test to done: %0d", cycles));
    chk(d_min == K'(ref_min) && d_max == K'(ref_max), $sformatf("calibration %0d/%0d vs %0d/%0d", d_min, d_max, ref_min, ref_max));
    r = real'(ref_max - ref_min); tr = r / real'(M);
    inl = 0.0; e_fail = 0;
    off = real'(ref_d[0] - ref_min) / tr;
    for (int i = 1; i <= int'(M); i++) begin
      dnl = real'(ref_d[i] - ref_d[i-1]) / tr - 1.0;
      inl += dnl;
      chk(near(dnl_got[i] / r, dnl), $sformatf("DNL %0d: %f vs %f", i, dnl_got[i] / r, dnl));
      chk(near(inl_got[i] / r, inl), $sformatf("INL %0d: %f vs %f", i, inl_got[i] / r, inl));
      if (dnl > 0.5 || dnl < -0.5 || inl > 0.5 || inl < -0.5) e_fail = 1;
    end
    gain = real'(ref_d[M] - ref_max) / tr - off;
    if (off > 0.5 || off < -0.5 || gain > 0.5 || gain < -0.5) e_fail = 1;
    chk(near(real'(off_s) / r, off) && near(real'(gain_s) / r, gain), "offset/gain");
    chk(nonmono == expect_nonmono, "non-monotonic flag");
    chk(pass == !(e_fail || expect_nonmono), "pass");
    for (int i = 0; i <= int'(M); i++) begin
      rd_addr = N'(i);
      @(posedge clock); #1;
      chk(rd_data == K'(ref_d[i]), $sformatf("stored D_%0d = %0d, expected %0d", i, rd_data, ref_d[i]));
    end
    @(negedge clock); test = 1'b0;
    @(negedge clock);
  endtask

  initial begin
    #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    input_code = '0;
    #2300 rst_n = 1'b1;
    repeat (3) @(negedge clock);
    for (int i = 0; i < 20; i++) begin
      input_code = N'($urandom); #1;
      chk(dac_code == input_code, "normal mode");
      @(negedge clock);
    end
    run(-1, 0.0, 1'b0);       // ideal DAC
    run(6, -1.6, 1'b1);       // code 6 below code 5
    run(9, 0.9, 1'b0);        // DNL error
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
