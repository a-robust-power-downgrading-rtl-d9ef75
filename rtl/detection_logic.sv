// detection_logic: decides whether the most significant part (MSP) of the
// RPDT adder can be switched off, and what its result then is.
//
// The MSP result is predictable whenever each MSP operand is a pure sign
// extension (all zeros or all ones): the MSP sum is then W-1 copies of a
// "sign" bit followed by a "carr-ctrl" bit in its least significant place,
// both set by the two operand classes and the carry C_LSP from the LSP:
//   both all-zero : sign = 0,          carr-ctrl = C_LSP
//   one all-one   : sign = not C_LSP,  carr-ctrl = not C_LSP
//   both all-one  : sign = 1,          carr-ctrl = C_LSP
// The unit forms A_and / A_nor (all ones / all zeros of A_MSP) and the same
// for B_MSP. close = 0 means "MSP closed"; it is 1 whenever either operand
// is not a sign extension. sign and carr-ctrl are forced to 0 while close
// is 1 so that the sign-extension unit adds nothing to a computed MSP sum.
//
// Timing: close, carr-ctrl and sign are registered on the rising edge of
// close_clk (asynchronous active-low reset rst_n), so the decision changes
// only once per close_clk period, after the operands and C_LSP have
// settled; glitches on the inputs do not reach the MSP. The three registers
// and their clock follow the published unit; the equations are derived from
// the table above. Reset opens the MSP (close = 1), a choice of this design
// that is correct for any operands. A_and and B_and are also
// given out unregistered for the carry-out network of the MSP.
module detection_logic #(
  parameter int unsigned W = rpdt_pkg::MSP_W_DEF
) (
  input  logic         close_clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_msp,
  input  logic [W-1:0] b_msp,
  input  logic         c_lsp,
  output logic         a_and,
  output logic         b_and,
  output logic         close,
  output logic         carr_ctrl,
  output logic         sign
);

  logic a_nor, b_nor;
  logic close_d, carr_d, sign_d;

  always_comb begin
    a_and   = &a_msp;
    b_and   = &b_msp;
    a_nor   = ~|a_msp;
    b_nor   = ~|b_msp;
    close_d = ~((a_and | a_nor) & (b_and | b_nor));
    sign_d  = ~close_d & ((a_and & b_and) | ((a_and ^ b_and) & ~c_lsp));
    carr_d  = ~close_d & (a_and ^ b_and ^ c_lsp);
  end

  always_ff @(posedge close_clk or negedge rst_n) begin
    if (!rst_n) begin
      close     <= 1'b1;
      carr_ctrl <= 1'b0;
      sign      <= 1'b0;
    end else begin
      close     <= close_d;
      carr_ctrl <= carr_d;
      sign      <= sign_d;
    end
  end

  // While the MSP is open the correction bits must not touch its sum.
  a_open_no_ext: assert property (@(posedge close_clk) disable iff (!rst_n)
    close |-> (!sign && !carr_ctrl));

endmodule
