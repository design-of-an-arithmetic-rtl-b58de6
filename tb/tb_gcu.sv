// tb_gcu: the GCU (default K = 5, N = 8) with DPM_1 played by the
// testbench, which holds each microinstruction for a random 1..3 cycles.
// Checks: LOAD sends N SHRs with the digits least significant first; MADD
// sends one MADD with its multiplier digit; READ sends N SHLs and returns
// DPM_1's digit for each one executed; the GCU never sends to a busy DPM_1;
// xfer_acc sums the value of the transfers DPM_1 emits on each MADD and ovf
// is set once one of them is nonzero, both cleared by LOAD; MUL sends
// SHL, MADD pairs with the multiplier digits most significant first, returns
// no read-out digits and builds the upper product part in xfer_acc
// (xfer_acc <- r*xfer_acc + digit on each SHL, + transfers on each MADD).
module tb_gcu;
  import sd_pkg::*;
  localparam int K = 5, N = 8, ALPHA = 2, NC = K * (K - 1) / 2;

  logic               clk = 1'b0, rst_n;
  logic               in_valid, in_ready;
  instr_e             in_op;
  logic [K:0]         in_m;
  logic [K:0]         in_a [N], in_phi [N];
  logic               rd_valid;
  logic [K:0]         rd_digit;
  logic               ovf;
  logic signed [47:0] xfer_acc;
  logic               busy;
  logic               d_fwd;
  uop_e               d_op;
  logic [K:0]         d_m, d_fa, d_fphi;
  logic [1:0]         d_cnt;
  dpm_stat_t          d_stat [ALPHA];
  logic [K:0]         d_a;
  logic [1:0]         d_at [K];
  logic               d_cpt_sign;
  logic [NC-1:0]      d_cpt;
  logic               d_exec;
  uop_e               d_exec_op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gcu dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // DPM_1 model: take, hold 1..3 cycles, execute.
  uop_e       h_op [$];
  logic [K:0] h_m [$], h_fa [$], h_fphi [$];
  int         t_hold;
  longint     exp_acc;
  bit         exp_ovf;
  logic [K:0] exp_rd [$];
  bit         in_mul = 1'b0;

  initial begin
    d_stat[1] = '{present: 1'b1, valid: 1'b0, cnt: 2'd0};
    d_stat[0] = '{present: 1'b1, valid: 1'b0, cnt: 2'd0};
    d_exec = 1'b0; d_exec_op = UOP_SHR; d_a = '0; d_cpt_sign = 1'b0; d_cpt = '0;
    for (int s = 0; s < K; s++) d_at[s] = '0;
    t_hold = 0;
    forever begin
      @(negedge clk);
      d_exec = 1'b0;
      if (d_stat[0].valid) begin
        if (t_hold == 0) begin
          d_exec    = 1'b1;
          d_exec_op = h_op[$];
          d_a       = (K+1)'($urandom);
          d_cpt_sign = 1'($urandom);
          d_cpt     = ($urandom_range(3) == 0) ? '0 : NC'($urandom);
          for (int s = 0; s < K; s++) d_at[s] = ($urandom_range(3) == 0) ? 2'b00 : 2'($urandom);
          if (h_op[$] == UOP_SHL) begin
            if (in_mul) exp_acc = exp_acc * (longint'(1) << K)
                                  + (d_a[K] ? -longint'(d_a[K-1:0]) : longint'(d_a[K-1:0]));
            else exp_rd.push_back(d_a);
          end
          if (h_op[$] == UOP_MADD) begin
            longint t;
            t = 0;
            for (int s = 0; s < K; s++) t += slot_val(d_at[s], tree_slot_composed(K + 1, 1'b1, s));
            for (int c = 0; c < K - 1; c++)
              for (int e = 0; e < K - 1 - c; e++)
                t += (d_cpt[pm_cpt_base(K, c) + e] ? (d_cpt_sign ? -(longint'(1) << c) : (longint'(1) << c)) : 0);
            exp_acc += t;
            if (t != 0) exp_ovf = 1'b1;
          end
        end else t_hold--;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (d_fwd) begin
        check(!d_stat[0].valid && d_cnt == d_stat[0].cnt, "forward only to an idle DPM_1");
        h_op.push_back(d_op); h_m.push_back(d_m); h_fa.push_back(d_fa); h_fphi.push_back(d_fphi);
        d_stat[0] <= '{present: 1'b1, valid: 1'b1, cnt: d_stat[0].cnt};
        t_hold <= $urandom_range(2);
      end else if (d_exec) begin
        d_stat[0] <= '{present: 1'b1, valid: 1'b0, cnt: d_stat[0].cnt + 2'd1};
      end
    end
  end

  task automatic issue(instr_e op, logic [K:0] m);
    in_valid = 1'b1; in_op = op; in_m = m;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (busy || d_stat[0].valid) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Read-out monitor.
  int n_rd = 0;
  always @(negedge clk) if (rst_n && rd_valid) begin
    check(exp_rd.size() > 0 && rd_digit == exp_rd[0], "read-out digit");
    if (exp_rd.size() > 0) void'(exp_rd.pop_front());
    n_rd++;
  end

  initial begin
    logic [K:0] m;
    rst_n = 1'b0; in_valid = 1'b0; in_op = INS_LOAD; in_m = '0;
    for (int i = 0; i < N; i++) begin in_a[i] = '0; in_phi[i] = '0; end
    exp_acc = 0; exp_ovf = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < N; i++) begin
        in_a[i] = (K+1)'($urandom); in_phi[i] = (K+1)'($urandom);
      end
      h_op.delete(); h_m.delete(); h_fa.delete(); h_fphi.delete();
      issue(INS_LOAD, '0);
      exp_acc = 0; exp_ovf = 1'b0;
      check(busy && !in_ready, "busy while sending LOAD");
      drain();
      check(h_op.size() == N, "LOAD sends N microinstructions");
      for (int j = 0; j < N && j < h_op.size(); j++)
        check(h_op[j] == UOP_SHR && h_fa[j] == in_a[N-1-j] && h_fphi[j] == in_phi[N-1-j],
              "LOAD digit order");
      check(xfer_acc == 0 && !ovf, "LOAD clears overflow report");
      h_op.delete(); h_m.delete();
      for (int b = 0; b < 5; b++) begin
        m = (K+1)'($urandom);
        issue(INS_MADD, m);
        drain();
        check(h_op.size() == 1 && h_op[0] == UOP_MADD && h_m[0] == m, "MADD microinstruction");
        check(longint'(xfer_acc) == exp_acc && ovf == exp_ovf, "transfer accumulation");
        if (longint'(xfer_acc) != exp_acc || ovf != exp_ovf) $display("  got %0d %0b exp %0d %0b", xfer_acc, ovf, exp_acc, exp_ovf);
        h_op.delete(); h_m.delete();
      end
      n_rd = 0;
      issue(INS_READ, '0);
      drain();
      check(h_op.size() == N && n_rd == N, "READ sends N SHLs and returns N digits");
      for (int j = 0; j < h_op.size(); j++) check(h_op[j] == UOP_SHL, "READ uses SHL");
      h_op.delete(); h_m.delete();
      for (int i = 0; i < N; i++) in_a[i] = (K+1)'($urandom);
      n_rd = 0;
      in_mul = 1'b1;
      issue(INS_MUL, '0);
      exp_acc = 0; exp_ovf = 1'b0;
      drain();
      in_mul = 1'b0;
      check(h_op.size() == 2 * N && n_rd == 0, "MUL sends 2N microinstructions and no read-out");
      for (int j = 0; j < N && 2 * j + 1 < h_op.size(); j++)
        check(h_op[2*j] == UOP_SHL && h_op[2*j+1] == UOP_MADD && h_m[2*j+1] == in_a[j],
              "MUL order and multiplier digits");
      check(longint'(xfer_acc) == exp_acc && ovf == exp_ovf, "MUL upper product part");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
