// tb_bu: exhaustive check of the Borovec unit over all 4x4 digit encodings
// (including the negative-zero code) and all four transfer-in pairs:
//   l + m + t+ - t- = d + 2*(t+out - t-out),
// and the limited-propagation property: t-out never depends on the incoming
// transfers and t+out never on the incoming positive transfer.
module tb_bu;
  import sd_pkg::*;
  rb_t   l, m, d;
  xfer_t tin, tout;
  int    checks = 0, failures = 0;

  bu dut (.l(l), .m(m), .tin(tin), .tout(tout), .d(d));

  function automatic int dv(rb_t x);
    return x.m ? (x.s ? -1 : 1) : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xfer_t ref0;
    for (int i = 0; i < 16; i++) begin
      {l, m} = 4'(i);
      tin = '0;
      #1;
      ref0 = tout;
      for (int t = 0; t < 4; t++) begin
        tin = xfer_t'(t);
        #1;
        checks++;
        if (dv(l) + dv(m) + int'(tin.p) - int'(tin.n) !=
            dv(d) + 2 * (int'(tout.p) - int'(tout.n))) begin
          failures++;
          $display("FAIL sum l=%b m=%b tin=%b d=%b tout=%b", l, m, tin, d, tout);
        end
        checks++;
        if (tout.n != ref0.n || (!tin.n && tout.p != ref0.p)) begin
          failures++;
          $display("FAIL propagation l=%b m=%b tin=%b tout=%b", l, m, tin, tout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
