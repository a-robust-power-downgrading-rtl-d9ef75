// msp_adder: the most significant part (MSP) of the RPDT adder.
//
// Holds the detection-logic unit, the two operand latches, the ordinary
// adder and the sign-extension unit. The detection logic registers, on
// close_clk, whether both MSP operands are sign extensions (close = 0). If
// so, the latches give the adder zero operands and the carry from the LSP
// is blocked, so the adder does not switch, and the SE unit produces the
// MSP sum from the registered sign and carr-ctrl bits. Otherwise the adder
// computes A_MSP + B_MSP + C_LSP as usual.
//
// Carry out of the whole word: the adder's own carry, or, for a closed MSP,
// A_and.B_and (both operands all ones) or (A_and xor B_and).C_LSP (one
// operand all ones and a carry arriving). Both extra terms imply a real
// carry-out even when the MSP is open, so the three are simply OR-ed.
//
// Timing: the datapath is combinational from a_msp, b_msp and c_lsp; the
// mode (close/sign/carr-ctrl) changes only at a rising close_clk edge, so a
// result is valid once an edge has sampled the settled operands.
module msp_adder #(
  parameter int unsigned W = rpdt_pkg::MSP_W_DEF
) (
  input  logic         close_clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_msp,
  input  logic [W-1:0] b_msp,
  input  logic         c_lsp,
  output logic [W-1:0] sum_msp,
  output logic         cout,
  output logic         close,
  output logic         sign,
  output logic         carr_ctrl
);

  logic         a_and, b_and;
  logic [W-1:0] a_l, b_l, ps;
  logic         cin, add_cout;

  detection_logic #(.W(W)) u_det (
    .close_clk, .rst_n, .a_msp, .b_msp, .c_lsp,
    .a_and, .b_and, .close, .carr_ctrl, .sign
  );

  msp_operand_latch #(.W(W)) u_latch_a (.close, .d(a_msp), .q(a_l));
  msp_operand_latch #(.W(W)) u_latch_b (.close, .d(b_msp), .q(b_l));

  assign cin = close & c_lsp;

  msp_ordinary_adder #(.W(W)) u_add (.a(a_l), .b(b_l), .cin, .ps, .cout(add_cout));

  sign_ext_unit #(.W(W)) u_se (.ps, .close, .sign, .carr_ctrl, .sum(sum_msp));

  assign cout = add_cout | (a_and & b_and) | ((a_and ^ b_and) & c_lsp);

  // A closed MSP must not switch: its adder sees zeros and produces zeros,
  // which the OR-based sign-extension unit relies on.
  a_closed_idle: assert property (@(posedge close_clk) disable iff (!rst_n)
    !close |-> (a_l == '0 && b_l == '0 && !cin && ps == '0 && !add_cout));

endmodule
