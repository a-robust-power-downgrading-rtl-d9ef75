// sparse_mod_adder: sparse-4 modulo 2^N+1 adder for diminished-1 operands.
//
// In diminished-1 form a value X in [1, 2^N] is carried as X* = X - 1 on N
// bits. The sum of two such values is
//   S* = (A* + B* + 1) mod 2^N   if A* + B* <  2^N
//   S* = (A* + B*)     mod 2^N   if A* + B* >= 2^N
// i.e. an N-bit addition whose carry-in is the inverted carry-out of the
// same addition. The three stages are:
//   1. pre-processing: H, G, P of every bit (preproc_cell);
//   2. a sparse carry tree: black operators first build the (G, P) of every
//      CS_W-bit block (pairs, then groups of four), then a prefix over the
//      blocks gives (G, P)_{4k+3:0} and a suffix gives G_{N-1:4k}. The carry
//      into block k is G_{4k-1:0} + P_{4k-1:0} . not(G_{N-1:4k}) (a gray
//      operator); the carry into block 0 is not(G_{N-1:0}). Only these N/4
//      carries are computed;
//   3. carry-select blocks that each hold both candidate sums and pick one.
// The block-level prefix and suffix use a Kogge-Stone arrangement; how the
// operators are arranged there, and the ripple inside each carry-select
// block, are this design's choice. The encoding of the value zero (which
// diminished-1 leaves outside the N-bit range) is not handled here.
//
// Ports: a, b (diminished-1 operands) -> s (diminished-1 sum),
//        cout (carry-out of A* + B*, i.e. A* + B* >= 2^N). Combinational.
module sparse_mod_adder
  import rpdt_pkg::*;
#(
  parameter int unsigned N    = LSP_W_DEF,
  parameter int unsigned CS_W = CS_W_DEF
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NB  = N / CS_W;           // number of CS blocks
  localparam int unsigned LB  = $clog2(CS_W);       // levels inside a block
  localparam int unsigned LV  = (NB > 1) ? $clog2(NB) : 1; // levels over blocks

  // ---- stage 1: pre-processing --------------------------------------------
  logic [N-1:0] h;
  gp_t  [N-1:0] gp;

  for (genvar i = 0; i < N; i++) begin : g_pre
    preproc_cell u_pre (.a(a[i]), .b(b[i]), .h(h[i]), .gp(gp[i]));
  end

  // ---- stage 2a: (G, P) of each block, binary tree of black operators -----
  // In block k, level l holds the groups of 2^l bits: g_lvl[l].o[m] is the
  // group of bits m*2^(l+1) .. m*2^(l+1)+2^(l+1)-1 of that block.
  gp_t blk [NB];

  for (genvar k = 0; k < NB; k++) begin : g_blk
    for (genvar l = 0; l < LB; l++) begin : g_lvl
      gp_t i_grp [CS_W >> l];
      gp_t o [CS_W >> (l+1)];
      if (l == 0) begin : g_from_bits
        for (genvar j = 0; j < CS_W; j++) begin : g_leaf
          assign i_grp[j] = gp[k*CS_W + j];
        end
      end else begin : g_from_lvl
        assign i_grp = g_lvl[l-1].o;
      end
      for (genvar m = 0; m < (CS_W >> (l+1)); m++) begin : g_op
        prefix_black_cell u_op (.hi(i_grp[2*m+1]), .lo(i_grp[2*m]), .o(o[m]));
      end
    end
    assign blk[k] = g_lvl[LB-1].o[0];
  end

  // ---- stage 2b: prefix (blocks k..0) and suffix (blocks NB-1..k) ---------
  // g_ks[l].po[k] spans blocks k .. k-2^(l+1)+1 and g_ks[l].so[k] spans
  // blocks k+2^(l+1)-1 .. k (clipped at the ends of the word).
  for (genvar l = 0; l < LV; l++) begin : g_ks
    gp_t pi [NB];
    gp_t si [NB];
    gp_t po [NB];
    gp_t so [NB];
    if (l == 0) begin : g_first
      assign pi = blk;
      assign si = blk;
    end else begin : g_next
      assign pi = g_ks[l-1].po;
      assign si = g_ks[l-1].so;
    end
    for (genvar k = 0; k < NB; k++) begin : g_col
      if (k >= (1 << l)) begin : g_p_op
        prefix_black_cell u_p (.hi(pi[k]), .lo(pi[k-(1<<l)]), .o(po[k]));
      end else begin : g_p_pass
        assign po[k] = pi[k];
      end
      if (k + (1 << l) < NB) begin : g_s_op
        prefix_black_cell u_s (.hi(si[k+(1<<l)]), .lo(si[k]), .o(so[k]));
      end else begin : g_s_pass
        assign so[k] = si[k];
      end
    end
  end

  gp_t pre [NB];   // (G, P) of bits 4k+3 .. 0
  gp_t suf [NB];   // (G, P) of bits N-1 .. 4k
  assign pre = g_ks[LV-1].po;
  assign suf = g_ks[LV-1].so;

  // ---- stage 2c: block carries with the inverted end-around carry ---------
  logic [NB-1:0] bcin;
  logic          g_all;    // G_{N-1:0}

  assign g_all   = pre[NB-1].g;
  assign bcin[0] = ~g_all;               // C_{-1}: inverted carry-out
  for (genvar k = 1; k < NB; k++) begin : g_gray
    prefix_gray_cell u_gray (.v(pre[k-1]), .gl_n(~suf[k].g), .c(bcin[k]));
  end

  // ---- stage 3: carry-select sum blocks -----------------------------------
  for (genvar k = 0; k < NB; k++) begin : g_cs
    cs_block #(.W(CS_W)) u_cs (
      .h  (h [k*CS_W +: CS_W]),
      .gp (gp[k*CS_W +: CS_W]),
      .cin(bcin[k]),
      .s  (s [k*CS_W +: CS_W])
    );
  end

  assign cout = g_all;

  initial begin
    assert (N % CS_W == 0 && N >= CS_W) else $error("N must be a multiple of CS_W");
    assert ((1 << LB) == CS_W) else $error("CS_W must be a power of two");
  end

endmodule
