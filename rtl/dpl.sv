// dpl: radix-2^K digit processing logic of one DPM (Figure 9 of the design).
//
// Computes one digit of  a' = a + m * phi  (a, phi: this DPM's accumulator
// and multiplicand digits; m: the multiplier digit common to all DPMs), all
// SM_r encoded. Parts:
//  - pm_gen forms the partial products of m and phi; columns 0..K-1 stay here,
//    columns K..2K-2 leave as cpt_out (CPT_(i-1)) for the more significant DPM;
//  - K MIRBAs, one per bit weight 2^c. MIRBA c adds accumulator bit a^c
//    (with a's sign), the c+1 own products of column c and the K-1-c entries
//    of CPT column c from the less significant DPM: K+1 inputs each;
//  - the MIRBAs' transfers run from column c to column c+1; column 0 takes
//    at_in (AT_i) from the less significant DPM and column K-1 drives at_out
//    (AT_(i-1)) to the more significant DPM;
//  - sd_encoder turns the K result digits into the SM_r digit a_new.
// Value identity (r = 2^K):
//   a + m*phi + AT_i + CPT_i = a_new + r*(AT_(i-1) + CPT_(i-1))
// a_new depends on AT_i/CPT_i, and these on the next DPMs' digits, but only a
// bounded number of positions deep (alpha_j DPMs in all).
// Purely combinational; the accumulator register sits in dpm.
module dpl
  import sd_pkg::*;
#(
  parameter int    K    = 5,
  parameter tree_e TREE = TREE_AUTO,
  parameter bit    TF   = 1'b0,          // Borovec unit form, see bu
  localparam int   NC   = K * (K - 1) / 2
) (
  input  logic [K:0]   a,
  input  logic [K:0]   phi,
  input  logic [K:0]   m,
  input  logic [1:0]   at_in   [K],   // AT_i from DPM_(i+1)
  input  logic         cpt_sign_in,   // CPT_i from DPM_(i+1)
  input  logic [NC-1:0] cpt_in,
  output logic [1:0]   at_out  [K],   // AT_(i-1) to DPM_(i-1)
  output logic         cpt_sign_out,  // CPT_(i-1) to DPM_(i-1)
  output logic [NC-1:0] cpt_out,
  output logic [K:0]   a_new
);
  logic               psign;
  logic [K*(K+1)/2-1:0] lo;
  rb_t                col_in [K][K+1];
  rb_t                dig [K];

  pm_gen #(.K(K)) u_pm (
    .phi (phi),
    .m   (m),
    .sign(psign),
    .lo  (lo),
    .cpt (cpt_out)
  );
  assign cpt_sign_out = psign;

  always_comb begin
    for (int c = 0; c < K; c++) begin
      col_in[c][0] = '{s: a[K], m: a[c]};
      for (int l = 0; l <= c; l++)
        col_in[c][1+l] = '{s: psign, m: lo[pm_lo_base(c) + l]};
      for (int e = 0; e < K - 1 - c; e++)
        col_in[c][c+2+e] = '{s: cpt_sign_in, m: cpt_in[pm_cpt_base(K, c) + e]};
    end
  end

  // Column c takes its transfers from column c-1 (column 0 from AT_i).
  for (genvar c = 0; c < K; c++) begin : g_col
    logic [1:0] t_in  [K];
    logic [1:0] t_out [K];
    if (c == 0) begin : g_first
      assign t_in = at_in;
    end else begin : g_next
      assign t_in = g_col[c-1].t_out;
    end
    mirba #(.K(K), .TREE(TREE), .TF(TF)) u_mirba (
      .x   (col_in[c]),
      .tin (t_in),
      .tout(t_out),
      .d   (dig[c])
    );
  end

  assign at_out = g_col[K-1].t_out;

  sd_encoder #(.K(K)) u_enc (.d(dig), .q(a_new));
endmodule
