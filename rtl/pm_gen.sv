// pm_gen: product-matrix generator of one DPM.
//
// Forms the K x K matrix of partial products of two SM_r digits, the
// multiplicand digit phi and the multiplier digit m: every entry is the AND of
// one magnitude bit of each, and all entries share one sign, the XOR of the
// two sign bits (K*K AND gates and one XOR, as the document states).
// The matrix is split by columns (Figures 3 and 4):
//   lo  : columns 0..K-1 (weights 2^0..2^(K-1)), added in this DPM's MIRBAs;
//         column c has c+1 entries x_l*y_(c-l), l = 0..c.
//   cpt : columns K..2K-2, the Collective Product Transfer to the next more
//         significant DPM, where column K+c has weight 2^c; it has K-1-c
//         entries x_l*y_(K+c-l), l = c+1..K-1. K(K-1)/2 bits plus the sign.
// Bit numbering follows sd_pkg::pm_lo_base and pm_cpt_base.
// Purely combinational.
module pm_gen
  import sd_pkg::*;
#(
  parameter int K = 5
) (
  input  logic [K:0]           phi,   // multiplicand digit, SM_r
  input  logic [K:0]           m,     // multiplier digit, SM_r
  output logic                 sign,
  output logic [K*(K+1)/2-1:0] lo,
  output logic [K*(K-1)/2-1:0] cpt
);
  always_comb begin
    sign = phi[K] ^ m[K];
    for (int c = 0; c < K; c++)
      for (int l = 0; l <= c; l++)
        lo[pm_lo_base(c) + l] = phi[l] & m[c-l];
    for (int c = 0; c < K - 1; c++)
      for (int l = c + 1; l < K; l++)
        cpt[pm_cpt_base(K, c) + l - c - 1] = phi[l] & m[K+c-l];
  end
endmodule
