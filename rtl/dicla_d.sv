// D-module of the dual-rail carry-lookahead adder.
//
// Joins the carry status of an upper block of bits [i:j] and a lower block
// [j-1:k] into that of the block [i:k], and sends the carry into bit j back
// up the tree from the carry into bit k:
//   P[i:k] = P[i:j] P[j-1:k]
//   K[i:k] = K[i:j] + P[i:j] K[j-1:k]
//   G[i:k] = G[i:j] + P[i:j] G[j-1:k]
//   C_j^0  = K[j-1:k] + P[j-1:k] C_k^0
//   C_j^1  = G[j-1:k] + P[j-1:k] C_k^1
// Block status stays one-hot and carries stay dual-rail; all-zero inputs
// give all-zero outputs (spacer). When the lower block kills or generates,
// C_j is valid before C_k arrives, which is what makes the adder fast on
// average. Equations follow the published D-module; combinational.
module dicla_d
  import mult_pkg::*;
(
  input  kgp_t i_hi,   // I[i:j]
  input  kgp_t i_lo,   // I[j-1:k]
  input  dr_t  c_k,    // carry into bit k
  output kgp_t i_out,  // I[i:k]
  output dr_t  c_j     // carry into bit j
);

  always_comb begin
    i_out.p = i_hi.p & i_lo.p;
    i_out.k = i_hi.k | (i_hi.p & i_lo.k);
    i_out.g = i_hi.g | (i_hi.p & i_lo.g);
    c_j.r0  = i_lo.k | (i_lo.p & c_k.r0);
    c_j.r1  = i_lo.g | (i_lo.p & c_k.r1);
  end

endmodule
