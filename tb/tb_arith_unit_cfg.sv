// tb_arith_unit_cfg: the end-to-end test of au_check over other radices and
// MIRBA trees, each with the lookahead alpha_j that the design derives from
// equation (4) and Table 1 of its source:
//   K = 2, 4 and 8 with the RBA-3 tree (alpha_j = 2),
//   K = 3 with the log2-sum tree chosen automatically (alpha_j = 2),
//   K = 2 and 4 with the log2-sum tree forced (alpha_j = 3);
// and, with the pin-saving inter-DPM interface (TEIG = 1: encoded transfers
// and indirectly generated CPT), K = 5 and 7 (RBA-3 tree), K = 3 (log2-sum
// tree, automatic) and K = 4 (log2-sum tree forced); and with the Transfer
// Format Borovec unit (TF = 1) at K = 5 (RBA-3 tree), K = 3 (log2-sum tree)
// and K = 4 (log2-sum tree forced, with TEIG).
// A correct result in every round shows that a DPM's new digit depends on no
// DPM further than alpha_j positions down the cascade.
module tb_arith_unit_cfg;
  import sd_pkg::*;
  localparam int NT = 13;
  localparam int    KS [NT] = '{2, 4, 8, 3, 2, 4, 5, 7, 3, 4, 5, 3, 4};
  localparam int    NS [NT] = '{10, 8, 4, 8, 10, 8, 8, 5, 8, 8, 8, 8, 8};
  localparam tree_e TS [NT] = '{TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_LOG2, TREE_LOG2,
                                TREE_AUTO, TREE_AUTO, TREE_AUTO, TREE_LOG2,
                                TREE_AUTO, TREE_AUTO, TREE_LOG2};
  localparam bit    ES [NT] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 1'b1,
                                1'b0, 1'b0, 1'b1};
  localparam bit    FS [NT] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0,
                                1'b1, 1'b1, 1'b1};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks [NT], failures [NT], n_stall [NT], n_overlap [NT], n_ovf [NT], n_neg [NT];
  logic done [NT];

  for (genvar g = 0; g < NT; g++) begin : g_cfg
    au_check #(.K(KS[g]), .N(NS[g]), .TREE(TS[g]), .USE_DEFAULT(1'b0), .TEIG(ES[g]), .TF(FS[g]),
              .ROUNDS(15)) u_chk (
      .clk(clk), .checks(checks[g]), .failures(failures[g]), .n_stall(n_stall[g]),
      .n_overlap(n_overlap[g]), .n_ovf(n_ovf[g]), .n_neg(n_neg[g]), .done(done[g]));
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int c, f;
    c = 0;
    f = 0;
    #1;
    for (int g = 0; g < NT; g++) begin
      wait (done[g]);
      $display("K=%0d N=%0d tree=%0d teig=%0d tf=%0d alpha=%0d: checks=%0d failures=%0d stall=%0d overlap=%0d ovf=%0d",
               KS[g], NS[g], TS[g], ES[g], FS[g], alpha_j(KS[g], TS[g]), checks[g], failures[g],
               n_stall[g], n_overlap[g], n_ovf[g]);
      c += checks[g];
      f += failures[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
