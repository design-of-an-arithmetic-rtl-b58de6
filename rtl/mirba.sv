// mirba: (K+1)-input multi-input redundant binary adder (MIRBA), one column
// of the radix-2^K digit adder.
//
// Adds K+1 redundant binary digits (SM_b) of one weight into one redundant
// binary digit, exchanging "transfers" with the neighbouring columns:
//   sum(x) + value(tin) = d + 2*value(tout)
// It is a tree built from Borovec units (bu) and, by default, RBA-3s:
//  - RBA-3 tree (the document's preferred form, Figure 8): at every level the
//    operands are taken three at a time into RBA-3s; two left over go into a
//    Borovec unit, one left over passes to the next level.
//  - log2-sum tree (Figure 6): operands are taken two at a time into Borovec
//    units, an odd one passes to the next level.
// TREE_AUTO uses the RBA-3 tree except for K = 3, where the document calls
// for the log2-sum tree. Either tree has exactly K Borovec units.
//
// Transfer slots: tin[s]/tout[s] belong to the s-th Borovec unit of the tree
// (numbered level by level; an RBA-3 takes two consecutive slots, its lower
// unit first). A lower-unit slot carries the C-element's composed transfer as
// an SM_b digit, every other slot a transfer pair {p, n}
// (sd_pkg::tree_slot_composed tells which). tout of this column feeds tin of
// the next more significant column. TF selects the Borovec unit form (see
// bu); the slots mean the same in both. Purely combinational.
module mirba
  import sd_pkg::*;
#(
  parameter int    K    = 5,
  parameter tree_e TREE = TREE_AUTO,
  parameter bit    TF   = 1'b0
) (
  input  rb_t        x    [K+1],
  input  logic [1:0] tin  [K],
  output logic [1:0] tout [K],
  output rb_t        d
);
  localparam int N    = K + 1;
  localparam bit USE3 = tree_uses_rba3(K, TREE);
  localparam int L    = tree_levels(N, USE3);

  // Level lv reads g_lvl[lv].opi and drives g_lvl[lv].opo; one array per
  // level keeps the levels apart for the tools' loop analysis.
  for (genvar lv = 0; lv < L; lv++) begin : g_lvl
    rb_t opi [N];
    rb_t opo [N];
    if (lv == 0) begin : g_first
      assign opi = x;
    end else begin : g_next
      assign opi = g_lvl[lv-1].opo;
    end
    localparam int W   = tree_width(N, USE3, lv);
    localparam int WN  = tree_width(N, USE3, lv + 1);
    localparam int N3  = USE3 ? W / 3 : 0;
    localparam int NB  = USE3 ? ((W % 3) == 2 ? 1 : 0) : W / 2;
    localparam int OFF = tree_slot_off(N, USE3, lv);

    for (genvar g = 0; g < N3; g++) begin : g_rba3
      rb_t cout;
      xfer_t tup_out;
      rba3 #(.TF(TF)) u_rba3 (
        .x0  (opi[3*g]),
        .x1  (opi[3*g+1]),
        .x2  (opi[3*g+2]),
        .cin (rb_t'(tin[OFF+2*g])),
        .cout(cout),
        .tin (xfer_t'(tin[OFF+2*g+1])),
        .tout(tup_out),
        .d   (opo[g])
      );
      assign tout[OFF+2*g]   = cout;
      assign tout[OFF+2*g+1] = tup_out;
    end

    for (genvar b = 0; b < NB; b++) begin : g_bu
      xfer_t t_out;
      bu #(.TF(TF)) u_bu (
        .l   (opi[3*N3+2*b]),
        .m   (opi[3*N3+2*b+1]),
        .tin (xfer_t'(tin[OFF+2*N3+b])),
        .tout(t_out),
        .d   (opo[N3+b])
      );
      assign tout[OFF+2*N3+b] = t_out;
    end

    if (W - 3 * N3 - 2 * NB == 1) begin : g_pass
      assign opo[N3+NB] = opi[W-1];
    end

    for (genvar j = WN; j < N; j++) begin : g_unused
      assign opo[j] = '0;
    end
  end

  assign d = g_lvl[L-1].opo[0];
endmodule
