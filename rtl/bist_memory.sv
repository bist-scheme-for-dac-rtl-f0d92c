// bist_memory: result store of the DAC BIST, built as four K-bit registers.
//
// Every evaluation needs only four index codes: D_min, D_max, the current D_i
// and the previous D_{i-1}. So instead of a memory holding all 2^N codes the
// store keeps just these four registers. On each rising clock edge the
// window label `tag` says what the count `d` on the input is:
//   WIN_MIN  -> D_min is loaded
//   WIN_MAX  -> D_max is loaded
//   WIN_CODE -> D_{i-1} <= D_i and D_i <= d; `code_valid` pulses for one
//               clock with `first` / `last` copied from the label
//   WIN_NONE -> nothing changes
// Outputs are registered: the values loaded at edge e are visible after e.
//
// With KEEP_ALL_CODES = 1 the store also writes every D_i into a 2^N x K
// array (address = code, counted from the `first` label), so the whole
// measured transfer curve can be read back after the test through
// `rd_addr` / `rd_data` (one clock read latency). With the default 0 the
// array is not built and `rd_data` is 0.
//
// A memory of all codes is what the scheme's block diagram shows; the four
// registers are the reduced-area form the scheme itself proposes, and are
// all the evaluation needs, so they are the default here. The load rules
// follow the test procedure; the label interface and the read port are
// this design's choices.
module bist_memory
  import dac_bist_pkg::*;
#(
  parameter int unsigned N              = 8,
  parameter int unsigned K              = 12,
  parameter bit          KEEP_ALL_CODES = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  input  win_tag_t     tag,
  output logic [K-1:0] d_min,
  output logic [K-1:0] d_max,
  output logic [K-1:0] d_i,
  output logic [K-1:0] d_i_1,
  output logic         code_valid,
  output logic         first,
  output logic         last,
  input  logic [N-1:0] rd_addr,
  output logic [K-1:0] rd_data
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_min      <= '0;
      d_max      <= '0;
      d_i        <= '0;
      d_i_1      <= '0;
      code_valid <= 1'b0;
      first      <= 1'b0;
      last       <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      first      <= 1'b0;
      last       <= 1'b0;
      unique case (tag.kind)
        WIN_MIN:  d_min <= d;
        WIN_MAX:  d_max <= d;
        WIN_CODE: begin
          d_i_1      <= d_i;
          d_i        <= d;
          code_valid <= 1'b1;
          first      <= tag.first;
          last       <= tag.last;
        end
        default: ;
      endcase
    end
  end

  if (KEEP_ALL_CODES) begin : g_code_mem
    logic [K-1:0] code_mem [1 << N];
    logic [N-1:0] wr_addr;

    // write address: 0 for the first code, then one up per code
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                     wr_addr <= '0;
      else if (tag.kind == WIN_CODE && tag.first)     wr_addr <= N'(1);
      else if (tag.kind == WIN_CODE)                  wr_addr <= wr_addr + 1'b1;
    end

    always_ff @(posedge clk) begin
      if (tag.kind == WIN_CODE) code_mem[tag.first ? '0 : wr_addr] <= d;
      rd_data <= code_mem[rd_addr];
    end
  end else begin : g_no_code_mem
    assign rd_data = '0;
  end
endmodule
