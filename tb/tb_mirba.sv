// tb_mirba: random check of the (K+1)-input MIRBA for the default K = 5
// (RBA-3 tree of the six-input example), K = 3 (log2-sum tree, chosen
// automatically), K = 2, 4 and 8, and the forced log2-sum tree at K = 5:
//   sum(x) + value(tin) = d + 2*value(tout)
// with random digits and random transfer slots. It also checks that the
// number of Borovec units equals K and, for K = 5, that the tree has the
// shape of the document's six-input examples.
module tb_mirba;
  import sd_pkg::*;
  localparam int NT = 6;
  localparam int KS [NT] = '{5, 3, 2, 4, 8, 5};
  localparam tree_e TS [NT] = '{TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_LOG2};
  localparam int ROUNDS = 3000;

  int checks = 0, failures = 0;
  int done = 0;

  function automatic int dv(rb_t x);
    return x.m ? (x.s ? -1 : 1) : 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default-parameter instance (K = 5, automatic tree).
  rb_t        x0 [6];
  logic [1:0] ti0 [5], to0 [5];
  rb_t        d0;
  mirba dut_default (.x(x0), .tin(ti0), .tout(to0), .d(d0));

  initial begin
    int lhs, rhs;
    for (int r = 0; r < ROUNDS; r++) begin
      for (int j = 0; j < 6; j++) x0[j] = rb_t'($urandom_range(3));
      for (int s = 0; s < 5; s++) ti0[s] = 2'($urandom_range(3));
      #1;
      lhs = 0;
      rhs = dv(d0);
      for (int j = 0; j < 6; j++) lhs += dv(x0[j]);
      for (int s = 0; s < 5; s++) begin
        lhs += slot_val(ti0[s], tree_slot_composed(6, 1'b1, s));
        rhs += 2 * slot_val(to0[s], tree_slot_composed(6, 1'b1, s));
      end
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL default K=5 lhs=%0d rhs=%0d", lhs, rhs);
      end
    end
    done++;
  end

  // Shape of the K = 5 trees: RBA-3 tree uses slots {composed, pair} x 2 and
  // a final pair (Figure 8); log2 tree has 3 + 1 + 1 units (Figure 6).
  initial begin
    checks++;
    if (tree_levels(6, 1'b1) != 2 || tree_slot_off(6, 1'b1, 1) != 4 ||
        !tree_slot_composed(6, 1'b1, 0) || tree_slot_composed(6, 1'b1, 1) ||
        !tree_slot_composed(6, 1'b1, 2) || tree_slot_composed(6, 1'b1, 4)) begin
      failures++;
      $display("FAIL RBA-3 tree shape");
    end
    checks++;
    if (tree_levels(6, 1'b0) != 3 || tree_level_bus(6, 1'b0) != 3 ||
        tree_level_bus(3, 1'b0) != 1 || tree_level_bus(2, 1'b0) != 1) begin
      failures++;
      $display("FAIL log2 tree shape");
    end
  end

  for (genvar g = 1; g < NT; g++) begin : g_k
    localparam int    KK   = KS[g];
    localparam tree_e TT   = TS[g];
    localparam bit    USE3 = tree_uses_rba3(KK, TT);
    rb_t        x  [KK+1];
    logic [1:0] ti [KK], to [KK];
    rb_t        d;
    mirba #(.K(KK), .TREE(TT)) dut (.x(x), .tin(ti), .tout(to), .d(d));

    initial begin
      int lhs, rhs, nbu;
      nbu = 0;
      for (int l = 0; l < tree_levels(KK + 1, USE3); l++)
        nbu += tree_level_bus(tree_width(KK + 1, USE3, l), USE3);
      checks++;
      if (nbu != KK) begin
        failures++;
        $display("FAIL K=%0d uses %0d Borovec units", KK, nbu);
      end
      for (int r = 0; r < ROUNDS; r++) begin
        for (int j = 0; j <= KK; j++) x[j] = rb_t'($urandom_range(3));
        for (int s = 0; s < KK; s++) ti[s] = 2'($urandom_range(3));
        #1;
        lhs = 0;
        rhs = dv(d);
        for (int j = 0; j <= KK; j++) lhs += dv(x[j]);
        for (int s = 0; s < KK; s++) begin
          lhs += slot_val(ti[s], tree_slot_composed(KK + 1, USE3, s));
          rhs += 2 * slot_val(to[s], tree_slot_composed(KK + 1, USE3, s));
        end
        checks++;
        if (lhs != rhs) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d lhs=%0d rhs=%0d", KK, lhs, rhs);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NT);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
