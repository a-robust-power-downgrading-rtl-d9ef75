// prefix_gray_cell: carry operator of the modulo 2^n+1 prefix tree.
//
// A diminished-1 modulo 2^n+1 adder feeds the inverted carry-out back as its
// carry-in. By the inverted circular idempotency of the prefix operator, the
// carry out of bit i is then
//   c_i = G_{i:0} + P_{i:0} . not(G_{n-1:i+1})
// so a carry is obtained from the group below and including bit i (the
// "V" input, G_V/P_V) and the complemented generate of the group above it
// (the "L" input, arriving inverted as G_L bar). In the original cell G_V and
// P_V also pass straight through, and a third signal T_V travels along; this
// tree takes G_V/P_V from their source and does not need T_V, so neither is
// an output here. Purely combinational.
//
// Ports: v (group i:0), gl_n (inverted generate of group n-1:i+1)
//        -> c (carry out of bit i).
module prefix_gray_cell
  import rpdt_pkg::*;
(
  input  gp_t  v,
  input  logic gl_n,
  output logic c
);

  assign c = v.g | (v.p & gl_n);

endmodule
