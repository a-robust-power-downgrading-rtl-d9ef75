// rpdt_adder: 24-bit adder with the robust power downgrading technique.
//
// The word is split between bits LSP_W-1 and LSP_W into a least significant
// part (LSP) and a most significant part (MSP). The LSP is a sparse-4
// modulo 2^LSP_W+1 adder on diminished-1 operands; its carry-out (the carry
// of A_LSP + B_LSP) is the carry into the MSP. The MSP adds the upper
// operand bits and that carry, but is switched off (fed zeros) whenever
// both upper operands are sign extensions, in which case its result is
// reconstructed from two registered bits (see msp_adder). The 24-bit width,
// the split point and the modulo adder in the LSP follow the published
// design; taking C_LSP as the plain carry of the LSP operands is this
// design's reading of it.
//
// Result: sum[LSP_W-1:0] is the diminished-1 modulo 2^LSP_W+1 sum of the
// lower operand bits; sum[top:LSP_W] = A_MSP + B_MSP + C_LSP (mod 2^MSP_W);
// cout is the carry out of the MSP. close/sign/carr_ctrl expose the MSP
// mode for observation.
//
// Timing: combinational from a and b, except that the MSP mode is taken at
// each rising edge of close_clk (asynchronous active-low reset rst_n, which
// opens the MSP). Operands applied before an edge give a valid result after
// it; when the mode does not change, the result is valid without an edge.
module rpdt_adder
  import rpdt_pkg::*;
#(
  parameter int unsigned MSP_W = MSP_W_DEF,
  parameter int unsigned LSP_W = LSP_W_DEF
) (
  input  logic                   close_clk,
  input  logic                   rst_n,
  input  logic [MSP_W+LSP_W-1:0] a,
  input  logic [MSP_W+LSP_W-1:0] b,
  output logic [MSP_W+LSP_W-1:0] sum,
  output logic                   cout,
  output logic                   c_lsp,
  output logic                   close,
  output logic                   sign,
  output logic                   carr_ctrl
);

  sparse_mod_adder #(.N(LSP_W)) u_lsp (
    .a   (a[LSP_W-1:0]),
    .b   (b[LSP_W-1:0]),
    .s   (sum[LSP_W-1:0]),
    .cout(c_lsp)
  );

  msp_adder #(.W(MSP_W)) u_msp (
    .close_clk, .rst_n,
    .a_msp  (a[MSP_W+LSP_W-1:LSP_W]),
    .b_msp  (b[MSP_W+LSP_W-1:LSP_W]),
    .c_lsp,
    .sum_msp(sum[MSP_W+LSP_W-1:LSP_W]),
    .cout, .close, .sign, .carr_ctrl
  );

endmodule
