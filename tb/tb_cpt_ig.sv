// tb_cpt_ig: exhaustive test of cpt_ig at K = 5 over every multiplicand
// digit and multiplier digit.
// Checks, for each pair:
//   - the value of the generated CPT, sum over its bits of 2^c, equals the
//     part of |phi| * |m| at weights 2^K and above, (sum of phi_l * m_k *
//     2^(l+k-K) over l + k >= K), formed here from the digit bits;
//   - its sign is the XOR of the digit signs;
//   - it is bit for bit the CPT that the neighbour's pm_gen would send, so
//     it can stand in for the direct CPT wires.
module tb_cpt_ig;
  import sd_pkg::*;
  localparam int K  = 5;
  localparam int NC = K * (K - 1) / 2;

  logic [K:0]           phi, m;
  logic                 sign, pm_sign;
  logic [NC-1:0]        cpt, pm_cpt;
  logic [K*(K+1)/2-1:0] pm_lo;
  int checks = 0;
  int failures = 0;

  cpt_ig #(.K(K)) dut (.phi_nb(phi), .m(m), .sign(sign), .cpt(cpt));
  pm_gen #(.K(K)) u_ref (.phi(phi), .m(m), .sign(pm_sign), .lo(pm_lo), .cpt(pm_cpt));

  initial begin
    #1000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int exp_v, got_v;
    for (int a = 0; a < (1 << (K + 1)); a++)
      for (int b = 0; b < (1 << (K + 1)); b++) begin
        phi = (K+1)'(a);
        m   = (K+1)'(b);
        #1;
        exp_v = 0;
        for (int l = 0; l < K; l++)
          for (int k = 0; k < K; k++)
            if (l + k >= K && phi[l] && m[k]) exp_v += 1 << (l + k - K);
        got_v = 0;
        for (int c = 0; c < K - 1; c++)
          for (int e = 0; e < K - 1 - c; e++)
            got_v += cpt[pm_cpt_base(K, c) + e] ? (1 << c) : 0;
        checks += 3;
        if (got_v != exp_v) begin
          failures++;
          $display("FAIL phi=%b m=%b: CPT value %0d, expected %0d", phi, m, got_v, exp_v);
        end
        if (sign != (phi[K] ^ m[K])) begin
          failures++;
          $display("FAIL phi=%b m=%b: sign %b", phi, m, sign);
        end
        if (cpt != pm_cpt) begin
          failures++;
          $display("FAIL phi=%b m=%b: bits %b, neighbour's pm_gen %b", phi, m, cpt, pm_cpt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pm_gen's low columns and sign are not needed here.
  logic unused;
  assign unused = ^{pm_lo, pm_sign};
endmodule
