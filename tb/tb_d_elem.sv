// tb_d_elem: exhaustive check of the D-element: p - n must equal the input
// digit, and p and n are never both set.
module tb_d_elem;
  import sd_pkg::*;
  rb_t  d;
  logic p, n;
  int   checks = 0, failures = 0;

  d_elem dut (.d(d), .p(p), .n(n));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      d = rb_t'(i);
      #1;
      checks++;
      if (int'(p) - int'(n) != (d.m ? (d.s ? -1 : 1) : 0) || (p && n)) begin
        failures++;
        $display("FAIL d=%b p=%0b n=%0b", d, p, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
