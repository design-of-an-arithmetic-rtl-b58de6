// tb_bu_tf: exhaustive test of the Transfer Format Borovec unit, and of bu
// built with it (TF = 1).
// For all 64 combinations of l, m (Transfer Format pairs) and tin it checks
//   l + m + tin = d + 2*tout,
// that tout.p does not depend on tin and tout.n does not depend on tin.n
// (bounded propagation), and that the SM_b unit bu #(.TF(1)) satisfies its
// own identity l + m + tin = d + 2*tout for the corresponding SM_b inputs.
module tb_bu_tf;
  import sd_pkg::*;
  xfer_t l, m, tin, tout, d;
  rb_t   ls, ms, ds;
  xfer_t touts;
  int checks = 0;
  int failures = 0;

  bu_tf dut (.l(l), .m(m), .tin(tin), .tout(tout), .d(d));
  bu #(.TF(1'b1)) u_smb (.l(ls), .m(ms), .tin(tin), .tout(touts), .d(ds));

  function automatic int pv(xfer_t x);
    return int'(x.p) - int'(x.n);
  endfunction

  initial begin
    #100000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    xfer_t tref;
    for (int v = 0; v < 64; v++) begin
      {l, m, tin} = 6'(v);
      ls = '{s: v[5], m: v[4]};
      ms = '{s: v[3], m: v[2]};
      #1;
      checks++;
      if (pv(l) + pv(m) + pv(tin) != pv(d) + 2 * pv(tout)) begin
        failures++;
        $display("FAIL l=%b m=%b tin=%b: d=%b tout=%b", l, m, tin, d, tout);
      end
      // Propagation: compare with tin.p and tin.n changed.
      tref = tout;
      for (int t = 0; t < 4; t++) begin
        tin = 2'(t);
        #1;
        checks++;
        if (tout.p != tref.p || (tin.p == v[1] && tout.n != tref.n)) begin
          failures++;
          $display("FAIL propagation l=%b m=%b tin=%b: tout=%b, with tin=%b tout=%b",
                   l, m, tin, tout, 2'(v), tref);
        end
      end
      tin = 2'(v);
      #1;
      checks++;
      if (rb_val(ls) + rb_val(ms) + pv(tin) != rb_val(ds) + 2 * pv(touts)) begin
        failures++;
        $display("FAIL bu TF=1 l=%b m=%b tin=%b: d=%b tout=%b", ls, ms, tin, ds, touts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
