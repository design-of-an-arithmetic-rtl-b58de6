// tb_pm_gen: the product-matrix generator's low columns plus its CPT columns
// (weighted 2^K) must add up to |phi|*|m|, with sign phi.s XOR m.s, and the
// CPT part must equal floor(|phi|*|m| / 2^K) less the low columns' carries.
// Exhaustive over all magnitudes and signs for the default K = 5.
module tb_pm_gen;
  import sd_pkg::*;
  localparam int K = 5;
  logic [K:0]           phi, m;
  logic                 sign;
  logic [K*(K+1)/2-1:0] lo;
  logic [K*(K-1)/2-1:0] cpt;
  int checks = 0, failures = 0;

  pm_gen dut (.phi(phi), .m(m), .sign(sign), .lo(lo), .cpt(cpt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vlo, vcpt;
    for (int i = 0; i < (1 << (2 * K + 2)); i++) begin
      {phi, m} = (2*K+2)'(i);
      #1;
      vlo = 0;
      vcpt = 0;
      for (int c = 0; c < K; c++)
        for (int l = 0; l <= c; l++)
          vlo += int'(lo[pm_lo_base(c) + l]) << c;
      for (int c = 0; c < K - 1; c++)
        for (int e = 0; e < K - 1 - c; e++)
          vcpt += int'(cpt[pm_cpt_base(K, c) + e]) << c;
      checks++;
      if (vlo + (vcpt << K) != int'(phi[K-1:0]) * int'(m[K-1:0]) || sign != (phi[K] ^ m[K])) begin
        failures++;
        if (failures < 10) $display("FAIL phi=%b m=%b lo=%0d cpt=%0d", phi, m, vlo, vcpt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
