// arith_unit: linear iteratively structured arithmetic unit (top level).
//
// A Global Control Unit (gcu) followed by N identical Digit Processing
// Modules (dpm), DPM_1 at the most significant end next to the GCU and DPM_N
// at the least significant end. Operands A (accumulator) and PHI
// (multiplicand) are N-digit radix-2^K signed-digit numbers; digit 0 is the
// most significant one. Each DPM holds one digit of each and talks only to
// its two neighbours: microinstructions and F digits travel down the cascade,
// status, accumulator digits and the AT/CPT transfers of the digit adder
// travel up. The GCU takes instructions (LOAD, MADD, READ, MUL, see gcu) and feeds
// microinstructions into DPM_1; a MADD executes as a wavefront from DPM_1
// down, one new microinstruction every ALPHA+2 cycles.
//
// Ports: clk, rst_n (asynchronous, active low); the GCU's instruction
// interface in_*; read-out stream rd_*; ovf/xfer_acc, the early overflow
// report of the GCU; quiet = the GCU and every DPM are idle; acc/phi show the
// digits held in the DPMs (index 0 = DPM_1), for observation.
// Default sizes: K = 5 (radix 32, the six-input MIRBA of the document's
// figures) and N = 8 digits; both are choices of this design.
// TEIG selects the inter-DPM interface. With TEIG = 0 (default, the digit
// logic of Figure 9) the AT transfers (2K wires) and the CPT (K(K-1)/2 + 1
// wires) cross between DPMs as they are. With TEIG = 1 they are replaced by
// the document's two pin-saving methods: a transfer_encoder at the sending
// DPM and a transfer_decoder at the receiving one carry AT as two counts of
// ceil(log2(K+1)) bits, and cpt_ig at the receiving DPM forms CPT from the
// neighbour's multiplicand digit (K+1 wires) and its own multiplier digit.
// The GCU receives DPM_1's transfers the same way. Results and timing are the
// same in both modes.
// TF selects the Borovec unit cell of every MIRBA: 0 = the sign-magnitude
// (SM_b) unit of the document's equations, 1 = the Transfer Format unit of
// two binary full adders (bu_tf).
module arith_unit
  import sd_pkg::*;
#(
  parameter int    K     = 5,
  parameter int    N     = 8,
  parameter tree_e TREE  = TREE_AUTO,
  parameter int    ALPHA = alpha_j(K, TREE),
  parameter int    XW    = 48,
  parameter bit    TEIG  = 1'b0,
  parameter bit    TF    = 1'b0,
  localparam int   NC    = K * (K - 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  instr_e               in_op,
  input  logic [K:0]           in_m,
  input  logic [K:0]           in_a   [N],
  input  logic [K:0]           in_phi [N],
  output logic                 rd_valid,
  output logic [K:0]           rd_digit,
  output logic                 ovf,
  output logic signed [XW-1:0] xfer_acc,
  output logic                 quiet,
  output logic [K:0]           acc [N],
  output logic [K:0]           phi [N]
);
  // Signals at the GCU / DPM_1 boundary.
  logic       g_fwd;
  uop_e       g_op;
  logic [K:0] g_m, g_fa, g_fphi;
  logic [1:0] g_cnt;
  logic       g_busy;

  // Values seen beyond DPM_N.
  dpm_stat_t     end_stat [ALPHA];
  logic [1:0]    end_at   [K];
  logic [NC-1:0] end_cpt;
  always_comb begin
    for (int k = 0; k < ALPHA; k++) end_stat[k] = '{present: 1'b0, valid: 1'b0, cnt: 2'd0};
    for (int s = 0; s < K; s++) end_at[s] = 2'b00;
    end_cpt = '0;
  end

  // Each g_dpm[i] block declares the outputs of DPM_(i+1); neighbours read
  // them through the generate hierarchy.
  for (genvar i = 0; i < N; i++) begin : g_dpm
    logic          l_fwd_i;
    uop_e          l_op_i;
    logic [K:0]    l_m_i, l_fa_i, l_fphi_i;
    logic [1:0]    l_cnt_i;
    dpm_stat_t     l_stat_o [ALPHA];
    logic [K:0]    l_a_o;
    logic [1:0]    l_at_o [K];
    logic          l_cpt_sign_o;
    logic [NC-1:0] l_cpt_o;
    logic          r_fwd_o;
    uop_e          r_op_o;
    logic [K:0]    r_m_o, r_fa_o, r_fphi_o;
    logic [1:0]    r_cnt_o;
    dpm_stat_t     r_stat_i [ALPHA];
    logic [K:0]    r_a_i;
    logic [1:0]    r_at_i [K];
    logic          r_cpt_sign_i;
    logic [NC-1:0] r_cpt_i;
    logic          x_exec_o;
    uop_e          x_op_o;
    logic [K:0]    phi_o;

    if (i == 0) begin : g_from_gcu
      assign l_fwd_i  = g_fwd;
      assign l_op_i   = g_op;
      assign l_m_i    = g_m;
      assign l_fa_i   = g_fa;
      assign l_fphi_i = g_fphi;
      assign l_cnt_i  = g_cnt;
    end else begin : g_from_left
      assign l_fwd_i  = g_dpm[i-1].r_fwd_o;
      assign l_op_i   = g_dpm[i-1].r_op_o;
      assign l_m_i    = g_dpm[i-1].r_m_o;
      assign l_fa_i   = g_dpm[i-1].r_fa_o;
      assign l_fphi_i = g_dpm[i-1].r_fphi_o;
      assign l_cnt_i  = g_dpm[i-1].r_cnt_o;
    end

    // Encoded transfer pins of DPM_(i+1) toward DPM_i (or the GCU).
    if (TEIG) begin : g_te
      logic [$clog2(K+1)-1:0] pcnt, ncnt;
      transfer_encoder #(.K(K), .TREE(TREE)) u_te (.t(l_at_o), .pcnt(pcnt), .ncnt(ncnt));
    end

    if (i == N - 1) begin : g_at_end
      assign r_stat_i     = end_stat;
      assign r_a_i        = '0;
      assign r_at_i       = end_at;
      assign r_cpt_sign_i = 1'b0;
      assign r_cpt_i      = end_cpt;
    end else if (TEIG) begin : g_from_right_teig
      assign r_stat_i = g_dpm[i+1].l_stat_o;
      assign r_a_i    = g_dpm[i+1].l_a_o;
      transfer_decoder #(.K(K), .TREE(TREE)) u_td (
        .pcnt(g_dpm[i+1].g_te.pcnt),
        .ncnt(g_dpm[i+1].g_te.ncnt),
        .t   (r_at_i)
      );
      cpt_ig #(.K(K)) u_ig (
        .phi_nb(g_dpm[i+1].phi_o),
        .m     (r_m_o),
        .sign  (r_cpt_sign_i),
        .cpt   (r_cpt_i)
      );
    end else begin : g_from_right
      assign r_stat_i     = g_dpm[i+1].l_stat_o;
      assign r_a_i        = g_dpm[i+1].l_a_o;
      assign r_at_i       = g_dpm[i+1].l_at_o;
      assign r_cpt_sign_i = g_dpm[i+1].l_cpt_sign_o;
      assign r_cpt_i      = g_dpm[i+1].l_cpt_o;
    end

    dpm #(.K(K), .TREE(TREE), .ALPHA(ALPHA), .TF(TF)) u_dpm (
      .clk        (clk),
      .rst_n      (rst_n),
      .l_fwd      (l_fwd_i),
      .l_op       (l_op_i),
      .l_m        (l_m_i),
      .l_fa       (l_fa_i),
      .l_fphi     (l_fphi_i),
      .l_cnt      (l_cnt_i),
      .l_stat     (l_stat_o),
      .l_a        (l_a_o),
      .l_at       (l_at_o),
      .l_cpt_sign (l_cpt_sign_o),
      .l_cpt      (l_cpt_o),
      .r_fwd      (r_fwd_o),
      .r_op       (r_op_o),
      .r_m        (r_m_o),
      .r_fa       (r_fa_o),
      .r_fphi     (r_fphi_o),
      .r_cnt      (r_cnt_o),
      .r_stat     (r_stat_i),
      .r_a        (r_a_i),
      .r_at       (r_at_i),
      .r_cpt_sign (r_cpt_sign_i),
      .r_cpt      (r_cpt_i),
      .x_exec     (x_exec_o),
      .x_op       (x_op_o),
      .phi_q      (phi_o)
    );

    assign acc[i] = l_a_o;
    assign phi[i] = phi_o;
  end

  // DPM_1's transfers as the GCU sees them.
  logic [1:0]    gc_at [K];
  logic          gc_cpt_sign;
  logic [NC-1:0] gc_cpt;
  if (TEIG) begin : g_gcu_teig
    transfer_decoder #(.K(K), .TREE(TREE)) u_td (
      .pcnt(g_dpm[0].g_te.pcnt),
      .ncnt(g_dpm[0].g_te.ncnt),
      .t   (gc_at)
    );
    cpt_ig #(.K(K)) u_ig (
      .phi_nb(g_dpm[0].phi_o),
      .m     (g_dpm[0].r_m_o),
      .sign  (gc_cpt_sign),
      .cpt   (gc_cpt)
    );
  end else begin : g_gcu_direct
    assign gc_at       = g_dpm[0].l_at_o;
    assign gc_cpt_sign = g_dpm[0].l_cpt_sign_o;
    assign gc_cpt      = g_dpm[0].l_cpt_o;
  end

  gcu #(.K(K), .N(N), .TREE(TREE), .ALPHA(ALPHA), .XW(XW)) u_gcu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_op     (in_op),
    .in_m      (in_m),
    .in_a      (in_a),
    .in_phi    (in_phi),
    .rd_valid  (rd_valid),
    .rd_digit  (rd_digit),
    .ovf       (ovf),
    .xfer_acc  (xfer_acc),
    .busy      (g_busy),
    .d_fwd     (g_fwd),
    .d_op      (g_op),
    .d_m       (g_m),
    .d_fa      (g_fa),
    .d_fphi    (g_fphi),
    .d_cnt     (g_cnt),
    .d_stat    (g_dpm[0].l_stat_o),
    .d_a       (g_dpm[0].l_a_o),
    .d_at      (gc_at),
    .d_cpt_sign(gc_cpt_sign),
    .d_cpt     (gc_cpt),
    .d_exec    (g_dpm[0].x_exec_o),
    .d_exec_op (g_dpm[0].x_op_o)
  );

  // Quiet: nothing left to send and no DPM holding a microinstruction.
  logic [N-1:0] dpm_hold;
  for (genvar i = 0; i < N; i++) begin : g_hold
    assign dpm_hold[i] = g_dpm[i].l_stat_o[0].valid;
  end
  assign quiet = !g_busy && (dpm_hold == '0);
endmodule
