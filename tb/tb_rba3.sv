// tb_rba3: exhaustive check of the three-input redundant binary adder over
// all digit encodings of x0, x1, x2, cin and all transfer pairs tin:
//   x0 + x1 + x2 + cin + tin = d + 2*(cout + tout),
// and cout depends on x0..x2 only.
module tb_rba3;
  import sd_pkg::*;
  rb_t   x0, x1, x2, cin, cout, d;
  xfer_t tin, tout;
  int    checks = 0, failures = 0;

  rba3 dut (.x0(x0), .x1(x1), .x2(x2), .cin(cin), .cout(cout),
            .tin(tin), .tout(tout), .d(d));

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
    int c0;
    for (int i = 0; i < 64; i++) begin
      {x0, x1, x2} = 6'(i);
      cin = '0;
      tin = '0;
      #1;
      c0 = dv(cout);
      for (int j = 0; j < 16; j++) begin
        {cin, tin} = 4'(j);
        #1;
        checks++;
        if (dv(x0) + dv(x1) + dv(x2) + dv(cin) + int'(tin.p) - int'(tin.n) !=
            dv(d) + 2 * (dv(cout) + int'(tout.p) - int'(tout.n))) begin
          failures++;
          $display("FAIL sum x=%b %b %b cin=%b tin=%b", x0, x1, x2, cin, tin);
        end
        checks++;
        if (dv(cout) != c0) begin
          failures++;
          $display("FAIL cout depends on cin/tin");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
