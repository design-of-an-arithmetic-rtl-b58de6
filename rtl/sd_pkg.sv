// sd_pkg: types and elaboration-time helpers shared by the signed-digit
// arithmetic element.
//
// Number formats
//   SM_r  : a radix-2^K signed digit, K+1 bits {sign, magnitude[K-1:0]}, value
//           (-1)^sign * magnitude, magnitude in 0..2^K-1 (maximally redundant
//           digit set). Used for storage and for digits passed between DPMs.
//   SM_b  : one redundant binary digit in {-1,0,1} as {sign, magnitude}
//           (rb_t). An SM_r digit splits into K SM_b digits by giving every
//           magnitude bit the common sign bit.
//   xfer_t: a pair of adder "transfers" of one Borovec unit, p worth +1 and
//           n worth -1 (the (0,1) and (0,-1) wires of the document's figures).
//
// The MIRBA tree helpers describe, for a (K+1)-input adder, how many operands
// each level of the tree has, which transfer slot belongs to which Borovec
// unit and whether a slot carries a plain transfer pair or the composed
// (C-element) transfer of an RBA-3's lower unit. Every MIRBA of every DPM
// uses the same numbering, so slot s of one column connects to slot s of the
// next more significant column.
package sd_pkg;

  typedef struct packed {
    logic s;   // 1 = negative
    logic m;   // magnitude
  } rb_t;

  typedef struct packed {
    logic p;   // positive transfer, +1
    logic n;   // negative transfer, -1
  } xfer_t;

  // Tree styles for the MIRBA. TREE_AUTO follows the document: RBA-3/RBA-2
  // tree for every K except K = 3, which uses the log2-sum tree.
  typedef enum logic [1:0] {
    TREE_AUTO = 2'd0,
    TREE_LOG2 = 2'd1,
    TREE_RBA3 = 2'd2
  } tree_e;

  // Microinstructions executed by the DPM cascade.
  typedef enum logic [1:0] {
    UOP_SHR  = 2'd0,   // a_i <- a_(i-1), phi_i <- phi_(i-1); DPM_1 takes the GCU's digits
    UOP_MADD = 2'd1,   // a_i <- a_i + m * phi_i (with transfers), equation (2)
    UOP_SHL  = 2'd2    // a_i <- a_(i+1); DPM_n takes 0; DPM_1's old digit goes to the GCU
  } uop_e;

  // Instructions accepted by the GCU.
  typedef enum logic [1:0] {
    INS_LOAD = 2'd0,   // load operands A and PHI (N digits each) into the cascade
    INS_MADD = 2'd1,   // A <- A + m * PHI
    INS_READ = 2'd2,   // shift A out, most significant digit first; A becomes 0
    INS_MUL  = 2'd3    // A, upper part in the GCU <- r^N * A + M * PHI
  } instr_e;

  // Hand-shake status one DPM shows to its more significant neighbour.
  typedef struct packed {
    logic       present;  // 0 beyond the least significant end
    logic       valid;    // a received microinstruction waits for execution
    logic [1:0] cnt;      // microinstructions executed so far, modulo 4
  } dpm_stat_t;

  function automatic int rb_val(rb_t d);
    return d.m ? (d.s ? -1 : 1) : 0;
  endfunction

  function automatic bit tree_uses_rba3(int k, tree_e tree);
    if (tree == TREE_AUTO) return k != 3;
    return tree == TREE_RBA3;
  endfunction

  // Operands left after one tree level acting on w operands.
  function automatic int tree_next_w(int w, bit use3);
    if (use3) return w / 3 + ((w % 3) != 0 ? 1 : 0);
    return w / 2 + w % 2;
  endfunction

  function automatic int tree_width(int n, bit use3, int lvl);
    int w = n;
    for (int l = 0; l < lvl; l++) w = tree_next_w(w, use3);
    return w;
  endfunction

  function automatic int tree_levels(int n, bit use3);
    int w = n;
    int l = 0;
    while (w > 1) begin
      w = tree_next_w(w, use3);
      l++;
    end
    return l;
  endfunction

  // Borovec units (transfer slots) used by one level acting on w operands.
  function automatic int tree_level_bus(int w, bit use3);
    if (use3) return 2 * (w / 3) + ((w % 3) == 2 ? 1 : 0);
    return w / 2;
  endfunction

  function automatic int tree_slot_off(int n, bit use3, int lvl);
    int off = 0;
    for (int l = 0; l < lvl; l++) off += tree_level_bus(tree_width(n, use3, l), use3);
    return off;
  endfunction

  // 1 if transfer slot s carries the composed transfer of an RBA-3 lower unit.
  function automatic bit tree_slot_composed(int n, bit use3, int s);
    int levels = tree_levels(n, use3);
    for (int l = 0; l < levels; l++) begin
      int off = tree_slot_off(n, use3, l);
      int n3  = use3 ? tree_width(n, use3, l) / 3 : 0;
      if (s >= off && s < off + 2 * n3 && ((s - off) % 2) == 0) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Bit s set when slot s of a (K+1)-input MIRBA is a composed-transfer slot;
  // meant for localparams, so that no tree walk is left for logic.
  function automatic logic [31:0] tree_composed_mask(int k, tree_e tree);
    logic [31:0] msk = '0;
    for (int s = 0; s < k && s < 32; s++)
      msk[s] = tree_slot_composed(k + 1, tree_uses_rba3(k, tree), s);
    return msk;
  endfunction

  // Value of one transfer slot, in units of the receiving column's weight.
  function automatic int slot_val(logic [1:0] v, bit composed);
    if (composed) return rb_val(rb_t'(v));
    return int'(v[1]) - int'(v[0]);
  endfunction

  // Number of DPMs a DPM needs information from, equation (4) with the
  // document's Table 1: 2 for the RBA-3 tree, and for the log2-sum tree
  // ceil((2*ceil(log2(K+1)) - 1)/K) + 1.
  function automatic int alpha_j(int k, tree_e tree);
    int ab;
    if (tree_uses_rba3(k, tree)) return 2;
    ab = 2 * $clog2(k + 1);
    return (ab - 1 + k - 1) / k + 1;
  endfunction

  // Product-matrix bit numbering. Low column c (weight 2^c, c = 0..K-1) holds
  // c+1 products x_l*y_(c-l), l = 0..c. CPT column c (weight 2^c in the next
  // more significant DPM, c = 0..K-2) is matrix column K+c and holds K-1-c
  // products x_l*y_(K+c-l), l = c+1..K-1.
  function automatic int pm_lo_base(int c);
    return c * (c + 1) / 2;
  endfunction

  function automatic int pm_cpt_base(int k, int c);
    return c * (k - 1) - c * (c - 1) / 2;
  endfunction

endpackage
