// cs_block: carry-select sum block of the sparse prefix adder.
//
// The sparse tree computes only one carry per W-bit block (the carry into
// the block). Inside the block, two sums are formed in parallel from the
// block's half-sum, generate and propagate bits: one assuming a carry-in of
// 0 and one assuming 1, each with a short ripple of local carries
// c_k = G_k + P_k . c_{k-1}. The block carry-in then selects one of them.
// Each sum bit is S_i = H_i xor C_{i-1} (the sum cell of the adder).
// Purely combinational; the block carry-in is the last signal to settle, so
// it passes through the select only.
//
// Ports: h, gp (per-bit half-sum and generate/propagate from preproc_cell),
//        cin (block carry-in from the prefix tree) -> s (W sum bits).
module cs_block
  import rpdt_pkg::*;
#(
  parameter int unsigned W = CS_W_DEF
) (
  input  logic [W-1:0] h,
  input  gp_t  [W-1:0] gp,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W-1:0] s0, s1;   // block sums for carry-in 0 and 1
  logic         c0, c1;   // running local carries of the two candidates

  always_comb begin
    c0 = 1'b0;
    c1 = 1'b1;
    for (int k = 0; k < W; k++) begin
      s0[k] = h[k] ^ c0;
      s1[k] = h[k] ^ c1;
      c0    = gp[k].g | (gp[k].p & c0);
      c1    = gp[k].g | (gp[k].p & c1);
    end
    s = cin ? s1 : s0;
  end

endmodule
