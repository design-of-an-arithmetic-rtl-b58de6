// tb_c_elem: exhaustive check of the C-element: the digit it produces must
// be worth p - n for all four input pairs.
module tb_c_elem;
  import sd_pkg::*;
  logic p, n;
  rb_t  d;
  int   checks = 0, failures = 0;

  c_elem dut (.p(p), .n(n), .d(d));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {p, n} = 2'(i);
      #1;
      checks++;
      if (rb_val(d) != int'(p) - int'(n)) begin
        failures++;
        $display("FAIL p=%0b n=%0b d=%0d", p, n, rb_val(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
