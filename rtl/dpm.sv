// dpm: Digit Processing Module, one stage of the linear iterative cascade.
//
// Holds one radix-2^K digit of the accumulator a and of the multiplicand phi
// (SM_r) and executes the microinstructions of sd_pkg::uop_e on them:
//   UOP_SHR  : a <- F.a, phi <- F.phi, where F is the pair of digits the more
//              significant neighbour held (for DPM_1: digits from the GCU);
//   UOP_MADD : a <- digit of a + m*phi (dpl), with transfers AT/CPT from the
//              less significant neighbour;
//   UOP_SHL  : a <- the less significant neighbour's a (0 at the end).
//
// Execution order (a synchronous version of the hand-shake of the design):
// microinstructions enter at DPM_1 and travel one DPM at a time toward the
// least significant end; every DPM executes them in order, and DPM_i executes
// mu_j only when
//   - DPM_(i-1) has executed mu_j (its count differs from ours), and
//   - each of the next ALPHA DPMs has executed mu_(j-1) and already holds
//     mu_j (so its digits and its transfers are those mu_j must see).
// A DPM passes mu_j on (with F = its own digits, taken before it executes
// mu_j) as soon as its right neighbour has executed mu_(j-1) and is empty.
// The result is a wavefront running from the most significant DPM down, so
// that one microinstruction can start every ALPHA+2 clock cycles and
// successive microinstructions overlap along the cascade.
//
// Neighbour interface (all registered values, so no combinational path runs
// along the cascade except the bounded AT/CPT transfers):
//   l_* : to/from DPM_(i-1) or the GCU;  r_* : to/from DPM_(i+1).
//   l_stat/r_stat carry {present, holding, executed count mod 4} of this DPM
//   and the next ALPHA-1 DPMs; a missing neighbour shows present = 0.
// x_exec pulses in the cycle a microinstruction executes, x_op tells which.
// The document describes the hand-shake and the digit logic; the
// microinstruction set, its encoding and this cycle-level protocol are this
// design's own choice.
module dpm
  import sd_pkg::*;
#(
  parameter int    K     = 5,
  parameter tree_e TREE  = TREE_AUTO,
  parameter int    ALPHA = alpha_j(K, TREE),
  parameter bit    TF    = 1'b0,          // Borovec unit form, see bu
  localparam int   NC    = K * (K - 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // from / to the more significant neighbour
  input  logic          l_fwd,
  input  uop_e          l_op,
  input  logic [K:0]    l_m,
  input  logic [K:0]    l_fa,
  input  logic [K:0]    l_fphi,
  input  logic [1:0]    l_cnt,
  output dpm_stat_t     l_stat [ALPHA],
  output logic [K:0]    l_a,
  output logic [1:0]    l_at [K],
  output logic          l_cpt_sign,
  output logic [NC-1:0] l_cpt,
  // to / from the less significant neighbour
  output logic          r_fwd,
  output uop_e          r_op,
  output logic [K:0]    r_m,
  output logic [K:0]    r_fa,
  output logic [K:0]    r_fphi,
  output logic [1:0]    r_cnt,
  input  dpm_stat_t     r_stat [ALPHA],
  input  logic [K:0]    r_a,
  input  logic [1:0]    r_at [K],
  input  logic          r_cpt_sign,
  input  logic [NC-1:0] r_cpt,
  // execution report
  output logic          x_exec,
  output uop_e          x_op,
  output logic [K:0]    phi_q
);
  logic [K:0] a_q;
  logic       hold_q;
  uop_e       op_q;
  logic [K:0] m_q, fa_q, fphi_q;
  logic [1:0] cnt_q;
  logic [K:0] a_madd;
  logic       right_ok;

  dpl #(.K(K), .TREE(TREE), .TF(TF)) u_dpl (
    .a           (a_q),
    .phi         (phi_q),
    .m           (m_q),
    .at_in       (r_at),
    .cpt_sign_in (r_cpt_sign),
    .cpt_in      (r_cpt),
    .at_out      (l_at),
    .cpt_sign_out(l_cpt_sign),
    .cpt_out     (l_cpt),
    .a_new       (a_madd)
  );

  always_comb begin
    right_ok = 1'b1;
    for (int k = 0; k < ALPHA; k++)
      if (r_stat[k].present && !(r_stat[k].valid && r_stat[k].cnt == cnt_q))
        right_ok = 1'b0;
  end

  assign x_exec = hold_q && (l_cnt != cnt_q) && right_ok;
  assign x_op   = op_q;
  assign r_fwd  = hold_q && r_stat[0].present && !r_stat[0].valid && (r_stat[0].cnt == cnt_q);
  assign r_op   = op_q;
  assign r_m    = m_q;
  assign r_fa   = a_q;
  assign r_fphi = phi_q;
  assign r_cnt  = cnt_q;
  assign l_a    = a_q;

  always_comb begin
    l_stat[0] = '{present: 1'b1, valid: hold_q, cnt: cnt_q};
    for (int k = 1; k < ALPHA; k++) l_stat[k] = r_stat[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      phi_q  <= '0;
      hold_q <= 1'b0;
      op_q   <= UOP_SHR;
      m_q    <= '0;
      fa_q   <= '0;
      fphi_q <= '0;
      cnt_q  <= '0;
    end else if (x_exec) begin
      unique case (op_q)
        UOP_SHR: begin
          a_q   <= fa_q;
          phi_q <= fphi_q;
        end
        UOP_MADD: a_q <= a_madd;
        UOP_SHL:  a_q <= r_a;
        default:  ;
      endcase
      hold_q <= 1'b0;
      cnt_q  <= cnt_q + 2'd1;
    end else if (l_fwd) begin
      hold_q <= 1'b1;
      op_q   <= l_op;
      m_q    <= l_m;
      fa_q   <= l_fa;
      fphi_q <= l_fphi;
    end
  end

  // A microinstruction arrives only in an empty slot.
  a_recv_empty: assert property (@(posedge clk) disable iff (!rst_n) l_fwd |-> !hold_q);
endmodule
