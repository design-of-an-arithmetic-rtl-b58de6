// tb_dpl: random check of the digit processing logic for the default K = 5
// and for K = 3 (log2-sum MIRBAs) and K = 8:
//   a + m*phi + AT_in + CPT_in = a_new + 2^K * (AT_out + CPT_out)
// with random SM_r digits and random transfers from the less significant
// DPM. Random CPT_in bits stand for any product matrix of that DPM.
module tb_dpl;
  import sd_pkg::*;
  localparam int NT = 3;
  localparam int KS [NT] = '{5, 3, 8};
  localparam int ROUNDS = 4000;
  int checks = 0, failures = 0;
  int done = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint smr(logic [15:0] v, int k);
    longint mag;
    mag = longint'(v & ((16'd1 << k) - 16'd1));
    return v[k] ? -mag : mag;
  endfunction

  for (genvar g = 0; g < NT; g++) begin : g_k
    localparam int KK   = KS[g];
    localparam int NC   = KK * (KK - 1) / 2;
    localparam bit USE3 = tree_uses_rba3(KK, TREE_AUTO);
    logic [KK:0]   a, phi, m, a_new;
    logic [1:0]    at_in [KK], at_out [KK];
    logic          cs_in, cs_out;
    logic [NC-1:0] c_in, c_out;

    if (g == 0) begin : g_default
      dpl dut (.a(a), .phi(phi), .m(m), .at_in(at_in), .cpt_sign_in(cs_in),
               .cpt_in(c_in), .at_out(at_out), .cpt_sign_out(cs_out),
               .cpt_out(c_out), .a_new(a_new));
    end else begin : g_param
      dpl #(.K(KK)) dut (.a(a), .phi(phi), .m(m), .at_in(at_in), .cpt_sign_in(cs_in),
               .cpt_in(c_in), .at_out(at_out), .cpt_sign_out(cs_out),
               .cpt_out(c_out), .a_new(a_new));
    end

    function automatic longint cptv(logic s, logic [NC-1:0] b);
      longint v = 0;
      for (int c = 0; c < KK - 1; c++)
        for (int e = 0; e < KK - 1 - c; e++)
          v += longint'(b[pm_cpt_base(KK, c) + e]) << c;
      return s ? -v : v;
    endfunction

    function automatic longint atv(logic [1:0] t [KK]);
      longint v = 0;
      for (int s = 0; s < KK; s++) v += slot_val(t[s], tree_slot_composed(KK + 1, USE3, s));
      return v;
    endfunction

    initial begin
      longint lhs, rhs;
      for (int r = 0; r < ROUNDS; r++) begin
        a   = (KK+1)'($urandom);
        phi = (KK+1)'($urandom);
        m   = (KK+1)'($urandom);
        if (r % 4 == 0) m[KK-1:0] = '1;   // largest multiplier digits
        for (int s = 0; s < KK; s++) at_in[s] = 2'($urandom_range(3));
        cs_in = 1'($urandom);
        c_in  = NC'({$urandom, $urandom});
        #1;
        lhs = smr(16'(a), KK) + smr(16'(m), KK) * smr(16'(phi), KK) + atv(at_in) + cptv(cs_in, c_in);
        rhs = smr(16'(a_new), KK) + (longint'(1) << KK) * (atv(at_out) + cptv(cs_out, c_out));
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
