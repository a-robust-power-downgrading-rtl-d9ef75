// rpdt_pkg: shared types and default sizes of the RPDT (robust power
// downgrading technique) adder.
//
// The adder is a 24-bit word split between bits 15 and 16: a 16-bit least
// significant part (LSP) built from a sparse-4 modulo 2^16+1 diminished-1
// adder and an 8-bit most significant part (MSP) that can be switched off.
// gp_t bundles the carry-generate and carry-propagate pair that every prefix
// operator of the LSP adder consumes and produces.
package rpdt_pkg;

  // Default part widths (24-bit adder, MSP/LSP split between bits 15 and 16).
  localparam int unsigned MSP_W_DEF = 8;
  localparam int unsigned LSP_W_DEF = 16;
  // Width of one carry-select block of the sparse prefix tree (sparse-4).
  localparam int unsigned CS_W_DEF  = 4;

  // Group carry-generate / carry-propagate pair (G_{i:j}, P_{i:j}).
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
