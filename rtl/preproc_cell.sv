// preproc_cell: pre-processing cell of the parallel-prefix LSP adder.
//
// For one bit position it forms the half-sum H = A xor B, the carry-generate
// G = A and B and the carry-propagate P = A or B, exactly the three equations
// of the adder's first stage. Purely combinational.
//
// Ports: a, b (operand bits) -> h (half sum), gp (generate/propagate pair).
module preproc_cell
  import rpdt_pkg::*;
(
  input  logic a,
  input  logic b,
  output logic h,
  output gp_t  gp
);

  always_comb begin
    h    = a ^ b;
    gp.g = a & b;
    gp.p = a | b;
  end

endmodule
