// tb_dpm: one DPM (default K = 5, ALPHA = 2) with its neighbours played by
// the testbench. Checks, over random rounds of SHR, MADD and SHL:
//  - a received microinstruction waits until the left neighbour's count says
//    it has executed it, and until the right neighbours hold it;
//  - r_fwd passes it on only to an empty right neighbour at the same count;
//  - SHR loads the F digits, SHL takes the right neighbour's digit, MADD
//    gives a + m*phi + AT_in + CPT_in = a' + 32*(AT_out + CPT_out);
//  - l_stat reports {present, holding, count} and forwards r_stat.
module tb_dpm;
  import sd_pkg::*;
  localparam int K = 5;
  localparam int NC = K * (K - 1) / 2;
  localparam int ALPHA = 2;

  logic          clk = 1'b0, rst_n;
  logic          l_fwd;
  uop_e          l_op;
  logic [K:0]    l_m, l_fa, l_fphi;
  logic [1:0]    l_cnt;
  dpm_stat_t     l_stat [ALPHA];
  logic [K:0]    l_a;
  logic [1:0]    l_at [K];
  logic          l_cpt_sign;
  logic [NC-1:0] l_cpt;
  logic          r_fwd;
  uop_e          r_op;
  logic [K:0]    r_m, r_fa, r_fphi;
  logic [1:0]    r_cnt;
  dpm_stat_t     r_stat [ALPHA];
  logic [K:0]    r_a;
  logic [1:0]    r_at [K];
  logic          r_cpt_sign;
  logic [NC-1:0] r_cpt;
  logic          x_exec;
  uop_e          x_op;
  logic [K:0]    phi_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpm dut (.*);

  function automatic longint sdv(logic [K:0] d);
    return d[K] ? -longint'(d[K-1:0]) : longint'(d[K-1:0]);
  endfunction
  function automatic longint atv(logic [1:0] t [K]);
    longint v = 0;
    for (int s = 0; s < K; s++) v += slot_val(t[s], tree_slot_composed(K + 1, 1'b1, s));
    return v;
  endfunction
  function automatic longint cptv(logic sg, logic [NC-1:0] b);
    longint v = 0;
    for (int c = 0; c < K - 1; c++)
      for (int e = 0; e < K - 1 - c; e++)
        v += longint'(b[pm_cpt_base(K, c) + e]) << c;
    return sg ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [1:0] cnt;
    logic [K:0] fa, fph, m, ra, a_before, phi_now;
    longint expv;
    uop_e op;
    rst_n = 1'b0;
    l_fwd = 1'b0; l_op = UOP_SHR; l_m = '0; l_fa = '0; l_fphi = '0; l_cnt = '0;
    r_a = '0; r_cpt_sign = 1'b0; r_cpt = '0;
    for (int s = 0; s < K; s++) r_at[s] = '0;
    for (int k = 0; k < ALPHA; k++) r_stat[k] = '{present: 1'b0, valid: 1'b0, cnt: 2'd0};
    cnt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int r = 0; r < 300; r++) begin
      op  = (r < 2) ? UOP_SHR : uop_e'($urandom_range(2));
      fa  = (K+1)'($urandom);
      fph = (K+1)'($urandom);
      m   = (K+1)'($urandom);
      ra  = (K+1)'($urandom);
      // Right neighbour present, empty, same count: the DPM must pass it on.
      r_stat[0] = '{present: 1'b1, valid: 1'b0, cnt: cnt};
      r_stat[1] = '{present: (r % 2 == 0), valid: 1'b0, cnt: cnt};
      // Left forwards the microinstruction.
      l_fwd = 1'b1; l_op = op; l_m = m; l_fa = fa; l_fphi = fph;
      @(negedge clk);
      l_fwd = 1'b0;
      check(l_stat[0] == '{present: 1'b1, valid: 1'b1, cnt: cnt}, "holding status");
      check(l_stat[1] == r_stat[0], "status forwarding");
      check(r_fwd && r_op == op && r_m == m && r_fa == l_a && r_fphi == phi_q, "pass on to right");
      check(!x_exec, "no execution before the left has executed");
      // Left executes; right still does not hold it.
      l_cnt = cnt + 2'd1;
      @(negedge clk);
      check(!x_exec, "no execution before the right neighbours hold it");
      // Right neighbours now hold it.
      r_stat[0].valid = 1'b1;
      r_stat[1].valid = 1'b1;
      r_a = ra;
      r_cpt_sign = 1'($urandom);
      r_cpt = NC'($urandom);
      for (int s = 0; s < K; s++) r_at[s] = 2'($urandom_range(3));
      #1;
      check(!r_fwd, "no second pass-on");
      check(x_exec && x_op == op, "executes when allowed");
      a_before = l_a;
      phi_now  = phi_q;
      expv = sdv(a_before) + sdv(m) * sdv(phi_now) + atv(r_at) + cptv(r_cpt_sign, r_cpt)
             - 32 * (atv(l_at) + cptv(l_cpt_sign, l_cpt));
      @(negedge clk);
      cnt = cnt + 2'd1;
      check(r_cnt == cnt && !l_stat[0].valid, "count advanced, slot freed");
      unique case (op)
        UOP_SHR:  check(l_a == fa && phi_q == fph, "SHR loads F digits");
        UOP_SHL:  check(l_a == ra && phi_q == phi_now, "SHL takes the right digit");
        UOP_MADD: check(sdv(l_a) == expv && phi_q == phi_now, "MADD result");
        default:  check(1'b0, "bad op");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
