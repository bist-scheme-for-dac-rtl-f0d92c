// tb_bist_memory: self-checking test of the four-register result store.
// Random labels and counts are applied; a reference model in the testbench
// tracks D_min, D_max, D_i and D_{i-1} and the valid/first/last outputs.
// A second instance with KEEP_ALL_CODES = 1 is then given a full sweep of
// 2^N codes, and every stored code is read back through the read port.
module tb_bist_memory;
  timeunit 1ns; timeprecision 1ps;
  import dac_bist_pkg::*;
  localparam int unsigned K = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [K-1:0] d, d_min, d_max, d_i, d_i_1;
  win_tag_t tag;
  logic code_valid, first, last;
  int checks = 0, failures = 0;
  int r_min = 0, r_max = 0, r_i = 0, r_i1 = 0;
  bit r_v = 0, r_f = 0, r_l = 0;

  localparam int unsigned N = 4;
  logic [N-1:0] rd_addr = '0;
  logic [K-1:0] rd_data, rd_data2, m_min, m_max, m_i, m_i1;
  logic m_v, m_f, m_l;
  int sweep_d[1 << N];

  bist_memory #(.N(N), .K(K)) dut (.clk, .rst_n, .d, .tag, .d_min, .d_max, .d_i, .d_i_1, .code_valid, .first, .last,
                                   .rd_addr, .rd_data);
  bist_memory #(.N(N), .K(K), .KEEP_ALL_CODES(1'b1)) dut_mem (
    .clk, .rst_n, .d, .tag, .d_min(m_min), .d_max(m_max), .d_i(m_i), .d_i_1(m_i1),
    .code_valid(m_v), .first(m_f), .last(m_l), .rd_addr, .rd_data(rd_data2));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tag = '{kind: WIN_NONE, first: 1'b0, last: 1'b0}; d = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      tag.kind  = win_kind_e'($urandom_range(3));
      tag.first = 1'($urandom_range(1));
      tag.last  = 1'($urandom_range(1));
      d = K'($urandom);
      @(posedge clk);
      r_v = 0; r_f = 0; r_l = 0;
      case (tag.kind)
        WIN_MIN: r_min = int'(d);
        WIN_MAX: r_max = int'(d);
        WIN_CODE: begin r_i1 = r_i; r_i = int'(d); r_v = 1; r_f = tag.first; r_l = tag.last; end
        default: ;
      endcase
      #1;
      checks++;
      if (d_min != K'(r_min) || d_max != K'(r_max) || d_i != K'(r_i) || d_i_1 != K'(r_i1) ||
          code_valid != r_v || first != r_f || last != r_l) begin
        failures++;
        $display("FAIL n=%0d kind=%0d: min %0d/%0d max %0d/%0d i %0d/%0d i1 %0d/%0d v%0b/%0b f%0b/%0b l%0b/%0b",
                 n, tag.kind, d_min, r_min, d_max, r_max, d_i, r_i, d_i_1, r_i1, code_valid, r_v, first, r_f, last, r_l);
      end
    end
    // full sweep into the code memory, with idle windows in between
    for (int i = 0; i < (1 << N); i++) begin
      if (i == 5) begin  // an idle window must not advance the address
        @(negedge clk); tag = '{kind: WIN_NONE, first: 1'b0, last: 1'b0}; d = '1;
      end
      @(negedge clk);
      sweep_d[i] = $urandom_range((1 << K) - 1);
      d = K'(sweep_d[i]);
      tag = '{kind: WIN_CODE, first: (i == 0), last: (i == (1 << N) - 1)};
    end
    @(negedge clk); tag = '{kind: WIN_NONE, first: 1'b0, last: 1'b0};
    for (int i = 0; i < (1 << N); i++) begin
      rd_addr = N'(i);
      @(posedge clk); #1;
      checks++;
      if (rd_data2 != K'(sweep_d[i]) || rd_data != '0) begin
        failures++; $display("FAIL read code %0d: %0d expected %0d", i, rd_data2, sweep_d[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
