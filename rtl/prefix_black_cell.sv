// prefix_black_cell: the black (full) prefix operator of the carry tree.
//
// Combines a more significant group (G_{i:k}, P_{i:k}) with the adjacent less
// significant group (G_{k-1:j}, P_{k-1:j}) into (G_{i:j}, P_{i:j}):
//   G_{i:j} = G_{i:k} + P_{i:k} . G_{k-1:j}
//   P_{i:j} = P_{i:k} . P_{k-1:j}
// P is the inclusive "or" propagate, as formed by preproc_cell.
// Purely combinational.
//
// Ports: hi (more significant group), lo (less significant group) -> o.
module prefix_black_cell
  import rpdt_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t o
);

  always_comb begin
    o.g = hi.g | (hi.p & lo.g);
    o.p = hi.p & lo.p;
  end

endmodule
