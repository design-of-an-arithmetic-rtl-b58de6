// cpt_ig: Indirect Generation (IG) of the collective product transfer.
//
// CPT_i, the upper product-matrix columns K..2K-2 of DPM_(i+1), depends only
// on DPM_(i+1)'s multiplicand digit and on the multiplier digit, which every
// DPM already holds. With IG, DPM_i receives the neighbour's multiplicand
// digit (K+1 pins) and forms CPT_i itself, instead of receiving the
// K(K-1)/2 + 1 CPT wires. Column K+c (weight 2^c in DPM_i) has the K-1-c
// entries phi_l * m_(K+c-l), l = c+1..K-1, and the sign is the XOR of the two
// digit signs; the bit order is that of pm_gen (sd_pkg::pm_cpt_base), so the
// output can replace pm_gen's cpt output one for one.
// The method is the document's; only the port names are this design's.
// Ports: phi_nb (multiplicand digit of DPM_(i+1), SM_r), m (multiplier digit,
// SM_r), sign / cpt (CPT_i as dpl takes it). Purely combinational.
module cpt_ig
  import sd_pkg::*;
#(
  parameter int  K  = 5,
  localparam int NC = K * (K - 1) / 2
) (
  input  logic [K:0]    phi_nb,
  input  logic [K:0]    m,
  output logic          sign,
  output logic [NC-1:0] cpt
);
  always_comb begin
    sign = phi_nb[K] ^ m[K];
    for (int c = 0; c < K - 1; c++)
      for (int l = c + 1; l < K; l++)
        cpt[pm_cpt_base(K, c) + l - c - 1] = phi_nb[l] & m[K+c-l];
  end
endmodule
