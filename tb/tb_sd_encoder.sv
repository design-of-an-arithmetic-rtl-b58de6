// tb_sd_encoder: exhaustive check, for the default K = 5, over every
// combination of SM_b digit codes: the SM_r output must have the value of the
// redundant binary input, and a zero result must carry a positive sign.
module tb_sd_encoder;
  import sd_pkg::*;
  localparam int K = 5;
  rb_t        d [K];
  logic [K:0] q;
  int checks = 0, failures = 0;

  sd_encoder dut (.d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, qv;
    for (int i = 0; i < (1 << (2 * K)); i++) begin
      v = 0;
      for (int c = 0; c < K; c++) begin
        d[c] = rb_t'((i >> (2 * c)) & 3);
        v += rb_val(d[c]) * (1 << c);
      end
      #1;
      qv = q[K] ? -int'(q[K-1:0]) : int'(q[K-1:0]);
      checks++;
      if (qv != v || (v == 0 && q[K])) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d q=%b", v, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
