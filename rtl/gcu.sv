// gcu: Global Control Unit at the most significant end of the DPM cascade.
//
// Accepts one instruction at a time (in_valid/in_ready) and turns it into
// microinstructions sent to DPM_1 only:
//   INS_LOAD : N x UOP_SHR carrying the digits of A and PHI, least
//              significant digit first, so that after N shifts digit 0 (the
//              most significant) sits in DPM_1 and digit N-1 in DPM_N;
//   INS_MADD : one UOP_MADD with multiplier digit in_m (A <- A + m*PHI);
//   INS_READ : N x UOP_SHL; each time DPM_1 executes one, its old digit comes
//              out on rd_digit with rd_valid, most significant digit first;
//   INS_MUL  : multiplication with the N multiplier digits given on in_a
//              (index 0 most significant), kept in the GCU and shifted out
//              most significant digit first. For each digit m_j the GCU sends
//              UOP_SHL (A <- r*A, DPM_1's old digit moves into the upper
//              part of the result) and then UOP_MADD with m_j (A <- A + m_j *
//              PHI): 2N microinstructions. The document names this cycle of
//              shift multiplier, multiply-and-add and shift accumulator; here
//              the accumulator shift comes first in each step, so that
//              the result is exactly r^N * A + M * PHI.
// The GCU behaves like a DPM_0 that executes each microinstruction when it
// hands it over: it forwards when DPM_1 is empty and has executed everything
// sent so far.
// Early overflow detection: whenever DPM_1 executes a MADD, the transfers it
// sends toward the GCU (AT_0 and CPT_0) are summed into a value T, in units of
// the weight just above DPM_1. xfer_acc accumulates T since the last LOAD and
// ovf is set when any T was nonzero, so that
//   value(A after) + xfer_acc * r^N = value(A before) + sum(m*PHI).
// During INS_MUL xfer_acc also collects the digits shifted out of DPM_1
// (xfer_acc <- r*xfer_acc + digit) and so holds the upper half of the
// product; MUL clears it and ovf when accepted, and afterwards
//   value(A after) + xfer_acc * r^N = r^N * value(A before) + M * PHI,
// which needs XW >= K*(N+1) + 2 bits.
// The document gives only the GCU's function; the instruction set,
// sequencing and overflow bookkeeping are this design's own.
module gcu
  import sd_pkg::*;
#(
  parameter int    K     = 5,
  parameter int    N     = 8,
  parameter tree_e TREE  = TREE_AUTO,
  parameter int    ALPHA = alpha_j(K, TREE),
  parameter int    XW    = 48,
  localparam int   NC    = K * (K - 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction interface
  input  logic                 in_valid,
  output logic                 in_ready,
  input  instr_e               in_op,
  input  logic [K:0]           in_m,
  input  logic [K:0]           in_a   [N],
  input  logic [K:0]           in_phi [N],
  // read-out stream and overflow report
  output logic                 rd_valid,
  output logic [K:0]           rd_digit,
  output logic                 ovf,
  output logic signed [XW-1:0] xfer_acc,
  output logic                 busy,
  // DPM_1 side
  output logic                 d_fwd,
  output uop_e                 d_op,
  output logic [K:0]           d_m,
  output logic [K:0]           d_fa,
  output logic [K:0]           d_fphi,
  output logic [1:0]           d_cnt,
  input  dpm_stat_t            d_stat [ALPHA],
  input  logic [K:0]           d_a,
  input  logic [1:0]           d_at [K],
  input  logic                 d_cpt_sign,
  input  logic [NC-1:0]        d_cpt,
  input  logic                 d_exec,
  input  uop_e                 d_exec_op
);
  localparam int CW = $clog2(2 * N + 1);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  localparam logic [31:0] COMPOSED = tree_composed_mask(K, TREE);

  logic [K:0]    a_q   [N];
  logic [K:0]    phi_q [N];
  uop_e          op_q;
  logic [K:0]    m_q;
  logic [CW-1:0] left_q;     // microinstructions still to send
  logic [1:0]    cnt_q;
  logic [IW-1:0] idx;
  logic signed [XW-1:0] tval;
  logic          mul_q;      // the instruction being sent is a MUL
  logic          fwd_mul_q;  // the last microinstruction sent belongs to a MUL
  logic [IW-1:0] jm;         // MUL: index of the multiplier digit in use

  assign in_ready = (left_q == '0);
  assign busy     = !in_ready;
  assign idx      = IW'(left_q - CW'(1));

  // Next digit pair to shift in: the least significant one not yet sent.
  assign d_fwd  = (left_q != '0) && !d_stat[0].valid && (d_stat[0].cnt == cnt_q);
  assign jm     = IW'(N - (32'(left_q) + 1) / 2);
  assign d_op   = mul_q ? (left_q[0] ? UOP_MADD : UOP_SHL) : op_q;
  assign d_m    = mul_q ? a_q[jm] : m_q;
  assign d_fa   = a_q[idx];
  assign d_fphi = phi_q[idx];
  assign d_cnt  = cnt_q;

  // Value of the transfers leaving DPM_1, in units of r^1 relative to DPM_1.
  always_comb begin
    int t;
    t = 0;
    for (int s = 0; s < K; s++)
      t += slot_val(d_at[s], COMPOSED[s]);
    for (int c = 0; c < K - 1; c++)
      for (int e = 0; e < K - 1 - c; e++)
        t += (d_cpt[pm_cpt_base(K, c) + e] ? (d_cpt_sign ? -(1 << c) : (1 << c)) : 0);
    tval = XW'(t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        a_q[i]   <= '0;
        phi_q[i] <= '0;
      end
      op_q     <= UOP_SHR;
      m_q      <= '0;
      mul_q    <= 1'b0;
      fwd_mul_q <= 1'b0;
      left_q   <= '0;
      cnt_q    <= '0;
      ovf      <= 1'b0;
      xfer_acc <= '0;
      rd_valid <= 1'b0;
      rd_digit <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (in_valid && in_ready) begin
        m_q   <= in_m;
        mul_q <= (in_op == INS_MUL);
        unique case (in_op)
          INS_LOAD: begin
            op_q     <= UOP_SHR;
            left_q   <= CW'(N);
            a_q      <= in_a;
            phi_q    <= in_phi;
            ovf      <= 1'b0;
            xfer_acc <= '0;
          end
          INS_MADD: begin
            op_q   <= UOP_MADD;
            left_q <= CW'(1);
          end
          INS_READ: begin
            op_q   <= UOP_SHL;
            left_q <= CW'(N);
          end
          INS_MUL: begin
            left_q   <= CW'(2 * N);
            a_q      <= in_a;
            ovf      <= 1'b0;
            xfer_acc <= '0;
          end
          default: ;
        endcase
      end else if (d_fwd) begin
        left_q    <= left_q - CW'(1);
        cnt_q     <= cnt_q + 2'd1;
        fwd_mul_q <= mul_q;
      end
      // DPM_1 executes only the microinstruction sent last, so fwd_mul_q
      // tells whether an executed SHL belongs to a MUL or to a READ.
      if (d_exec && d_exec_op == UOP_SHL && fwd_mul_q)
        xfer_acc <= (xfer_acc <<< K) + (d_a[K] ? -XW'(d_a[K-1:0]) : XW'(d_a[K-1:0]));
      if (d_exec && d_exec_op == UOP_SHL && !fwd_mul_q) begin
        rd_valid <= 1'b1;
        rd_digit <= d_a;
      end
      if (d_exec && d_exec_op == UOP_MADD) begin
        xfer_acc <= xfer_acc + tval;
        if (tval != 0) ovf <= 1'b1;
      end
    end
  end

  a_fwd_one: assert property (@(posedge clk) disable iff (!rst_n) d_fwd |-> d_stat[0].present);
endmodule
