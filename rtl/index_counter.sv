// index_counter: turns the VCO frequency into an index code D.
//
// D is the number of VCO oscillations (rising edges of `osc`) inside one
// period of the test clock. Since the count over a fixed period T is
// D = T * f, a linear VCO makes D linear in the DAC output voltage.
//
// How it works. The counter proper is clocked by the VCO itself and runs
// freely, modulo 2^K; it is kept in Gray code so that at most one bit changes
// per oscillation. At every rising edge of the test clock its value is taken
// through a two-stage synchroniser into the clock domain, converted back to
// binary, and the previous sample is subtracted. The difference (modulo 2^K)
// is the number of oscillations between two successive clock edges, i.e. in
// one period T. This counts the same oscillations as a counter that is read
// and then reset at the end of every period, without losing the edges that
// arrive while a reset is applied and without sampling a binary word while it
// changes. K must cover the largest count, T * f_max.
//
// Timing: the count of the window that ends at clock edge e is on `d` after
// edge e + IDX_LATENCY (dac_bist_pkg::IDX_LATENCY = 2), and `d` changes once
// per clock. The VCO-domain reset is released synchronously to `osc`.
//
// Counting VCO oscillations per clock period follows the scheme; the
// free-running Gray counter with differencing is this design's choice.
module index_counter #(
  parameter int unsigned K = 12
) (
  input  logic         clk,    // test clock, period T
  input  logic         rst_n,  // asynchronous reset, active low
  input  logic         osc,    // VCO output
  output logic [K-1:0] d       // oscillations in one clock period
);
  timeunit 1ns; timeprecision 1ps;

  function automatic logic [K-1:0] gray2bin(input logic [K-1:0] g);
    logic [K-1:0] b;
    b[K-1] = g[K-1];
    for (int i = int'(K) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- VCO domain ----------------
  logic         osc_rst_n_meta, osc_rst_n;
  logic [K-1:0] bin_q, bin_nxt, gray_q;

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) begin
      osc_rst_n_meta <= 1'b0;
      osc_rst_n      <= 1'b0;
    end else begin
      osc_rst_n_meta <= 1'b1;
      osc_rst_n      <= osc_rst_n_meta;
    end
  end

  assign bin_nxt = bin_q + 1'b1;

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) begin
      bin_q  <= '0;
      gray_q <= '0;
    end else if (osc_rst_n) begin
      bin_q  <= bin_nxt;
      gray_q <= bin_nxt ^ (bin_nxt >> 1);
    end
  end

  // ---------------- clock domain ----------------
  logic [K-1:0] sync1, sync2, prev_bin, cur_bin;

  assign cur_bin = gray2bin(sync2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1    <= '0;
      sync2    <= '0;
      prev_bin <= '0;
      d        <= '0;
    end else begin
      sync1    <= gray_q;
      sync2    <= sync1;
      prev_bin <= cur_bin;
      d        <= cur_bin - prev_bin;
    end
  end
endmodule
