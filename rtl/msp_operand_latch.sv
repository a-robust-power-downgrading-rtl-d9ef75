// msp_operand_latch: input isolation of the MSP adder (Latch-A / Latch-B).
//
// While the MSP is in use (close = 1) the operand passes to the MSP adder.
// While it is closed (close = 0) the adder's input is held at all zeros, so
// the adder stops switching and its pseudo-sum is zero, which the
// sign-extension unit relies on when it ORs in the predicted result.
// Driving zeros rather than letting the node float avoids voltage-drop
// problems over long closed periods. Forcing zeros instead of holding the
// last operand is this design's reading of the "latch", chosen because the
// sign-extension unit needs a zero pseudo-sum. Combinational: the output follows
// close, which is itself registered in detection_logic.
//
// Ports: close, d (MSP operand) -> q (operand seen by the MSP adder).
module msp_operand_latch #(
  parameter int unsigned W = rpdt_pkg::MSP_W_DEF
) (
  input  logic         close,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  assign q = close ? d : '0;

endmodule
