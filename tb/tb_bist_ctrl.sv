// tb_bist_ctrl: self-checking test of the BIST sequencer.
// A pattern counter of the testbench's own follows `pattern_en`. The test
// checks the order and length of the phases (one period on V_min, one on
// V_max, 2^N sweep periods, then done), the labels arriving IDX_LATENCY+1
// clocks after their period, the dsp_start pulse, busy, and abort when
// `test` falls in the middle of a sweep (labels in flight are dropped).
module tb_bist_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned N = 3;
  logic clk = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic pattern_en, dsp_start, busy;
  vco_sel_e vco_sel;
  win_tag_t tag_aligned;
  int pcode = 0;
  int checks = 0, failures = 0;
  win_tag_t tag_hist[$];
  win_tag_t exp_tag;

  bist_ctrl dut (.clk, .rst_n, .test, .pattern_first(pcode == 0), .pattern_last(pcode == (1 << N) - 1),
                 .vco_sel, .pattern_en, .dsp_start, .tag_aligned, .busy);

  always #5 clk = ~clk;
  always_ff @(posedge clk) pcode <= pattern_en ? (pcode + 1) % (1 << N) : 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected label of the current period
  function automatic win_tag_t tag_of(input vco_sel_e s, input logic en, input int c);
    win_tag_t t;
    t = '{kind: WIN_NONE, first: 1'b0, last: 1'b0};
    if (en) t = '{kind: WIN_CODE, first: (c == 0), last: (c == (1 << N) - 1)};
    else if (s == VSEL_MIN && busy) t.kind = WIN_MIN;
    else if (s == VSEL_MAX) t.kind = WIN_MAX;
    return t;
  endfunction

  // record each period's label; the aligned output must match it 3 edges on
  // (test low empties the pipeline)
  always @(posedge clk) if (rst_n) begin
    if (!test) begin
      tag_hist.delete();
      repeat (IDX_LATENCY + 1) tag_hist.push_back('{kind: WIN_NONE, first: 1'b0, last: 1'b0});
    end else begin
      tag_hist.push_back(tag_of(vco_sel, pattern_en, pcode));
      if (tag_hist.size() > IDX_LATENCY + 1) void'(tag_hist.pop_front());
    end
  end
  always @(negedge clk) if (rst_n && tag_hist.size() == IDX_LATENCY + 1) begin
    exp_tag = tag_hist[0];
    chk(tag_aligned == exp_tag, "aligned label");
  end

  initial begin
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(!busy && !pattern_en && vco_sel == VSEL_DAC, "idle");
    test = 1'b1;
    #1 chk(dsp_start, "start pulse");
    @(negedge clk); chk(vco_sel == VSEL_MIN && !dsp_start && busy && !pattern_en, "cal min");
    @(negedge clk); chk(vco_sel == VSEL_MAX && !dsp_start && !pattern_en, "cal max");
    for (int c = 0; c < (1 << N); c++) begin
      @(negedge clk); chk(vco_sel == VSEL_DAC && pattern_en && pcode == c && busy, "sweep");
    end
    @(negedge clk); chk(!pattern_en && !busy && vco_sel == VSEL_DAC, "done");
    repeat (5) @(negedge clk);
    chk(!pattern_en && !busy, "stays done");
    test = 1'b0;
    @(negedge clk); chk(!busy, "back to idle");
    // second run, aborted in the sweep
    test = 1'b1;
    repeat (5) @(negedge clk);
    chk(pattern_en, "second sweep running");
    test = 1'b0;
    @(negedge clk); chk(!pattern_en && !busy, "abort");
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
