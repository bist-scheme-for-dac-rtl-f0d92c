// tb_index_counter: self-checking test of the index counter.
// A testbench oscillator with a changing period drives `osc`; the testbench
// counts the oscillator's rising edges itself and takes the difference of
// its count between successive clock edges. The DUT's `d` must equal that
// reference exactly, IDX_LATENCY clock edges later. K is small so that the
// free-running counter wraps many times during the run.
module tb_index_counter;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned K = 7;
  localparam real T_NS = 1000.0;
  logic clk = 1'b0, rst_n = 1'b0, osc = 1'b0;
  logic [K-1:0] d;
  int checks = 0, failures = 0;
  real half_ns = 5.3;
  int ref_edges = 0, snap_prev = 0;
  int exp_q[$];

  index_counter #(.K(K)) dut (.clk, .rst_n, .osc, .d);

  always #(T_NS / 2.0) clk = ~clk;
  initial forever begin #(half_ns); osc = ~osc; end
  always @(posedge osc) ref_edges++;

  initial begin
    #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #2300 rst_n = 1'b1;
    @(posedge clk); snap_prev = ref_edges;
    for (int n = 0; n < 120; n++) begin
      @(posedge clk);
      exp_q.push_back(ref_edges - snap_prev);
      snap_prev = ref_edges;
      if (exp_q.size() > IDX_LATENCY) begin
        #1;
        checks++;
        if (d !== K'(exp_q[0])) begin
          failures++; $display("FAIL n=%0d d=%0d exp=%0d", n, d, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      // vary the frequency between about 5 MHz and 100 MHz
      half_ns = 5.0 + real'($urandom_range(9500)) / 100.0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
