// au_check: end-to-end exerciser of arith_unit, used by the top-level
// testbenches. With USE_DEFAULT = 1 it instantiates arith_unit with no
// parameter list (K = 5, N = 8); otherwise with the given K, N and TREE.
//
// Each round loads random operands A and PHI, checks that the digits landed
// in the right DPMs, issues a burst of MADD instructions with random
// multiplier digits (positive, negative, zero and the largest ones) back to
// back, then reads A out and checks
//   value(A read) + xfer_acc * r^N = value(A loaded) + sum(m_j) * value(PHI)
// with values computed here from the digits (r = 2^K). It also checks the
// microinstruction period in a burst (one MADD per ALPHA+2 cycles) and that
// A is zero after READ. It counts the mechanisms it saw: stalls of the
// instruction interface, overlapped issue (a new instruction accepted while
// earlier ones are still in the cascade), nonzero transfers out of DPM_1
// (overflow flag), and negative multiplier digits.
// Each round then loads new operands, multiplies (MUL) by a random N-digit
// multiplier, reads A and checks, with 128-bit values,
//   value(A read) + xfer_acc * r^N = r^N * value(A loaded) + M * value(PHI).
module au_check
  import sd_pkg::*;
#(
  parameter int    K           = 5,
  parameter int    N           = 8,
  parameter tree_e TREE        = TREE_AUTO,
  parameter bit    USE_DEFAULT = 1'b1,
  parameter bit    TEIG        = 1'b0,
  parameter bit    TF          = 1'b0,
  parameter int    ROUNDS      = 20,
  parameter int    BURST       = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_overlap,
  output int   n_ovf,
  output int   n_neg,
  output logic done
);
  localparam int ALPHA = alpha_j(K, TREE);

  logic                rst_n;
  logic                in_valid, in_ready;
  instr_e              in_op;
  logic [K:0]          in_m;
  logic [K:0]          in_a [N], in_phi [N];
  logic                rd_valid;
  logic [K:0]          rd_digit;
  logic                ovf;
  logic signed [47:0]  xfer_acc;
  logic                quiet;
  logic [K:0]          acc [N], phi [N];

  if (USE_DEFAULT) begin : g_default
    arith_unit dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_op(in_op), .in_m(in_m), .in_a(in_a), .in_phi(in_phi),
      .rd_valid(rd_valid), .rd_digit(rd_digit), .ovf(ovf), .xfer_acc(xfer_acc),
      .quiet(quiet), .acc(acc), .phi(phi));
  end else begin : g_param
    arith_unit #(.K(K), .N(N), .TREE(TREE), .XW(48), .TEIG(TEIG), .TF(TF)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
      .in_op(in_op), .in_m(in_m), .in_a(in_a), .in_phi(in_phi),
      .rd_valid(rd_valid), .rd_digit(rd_digit), .ovf(ovf), .xfer_acc(xfer_acc),
      .quiet(quiet), .acc(acc), .phi(phi));
  end

  function automatic longint sdv(logic [K:0] d);
    return d[K] ? -longint'(d[K-1:0]) : longint'(d[K-1:0]);
  endfunction

  function automatic logic signed [127:0] wide(logic [K:0] d [N]);
    logic signed [127:0] v = 0;
    for (int i = 0; i < N; i++) v = (v <<< K) + 128'(sdv(d[i]));
    return v;
  endfunction

  function automatic longint numv(logic [K:0] d [N]);
    longint v = 0;
    for (int i = 0; i < N; i++) v = v * (longint'(1) << K) + sdv(d[i]);
    return v;
  endfunction

  // Stall and overlap monitors; the driver works on the falling edge, when
  // every registered signal is settled.
  always @(negedge clk) begin
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && in_valid && in_ready && !quiet && in_op == INS_MADD) n_overlap++;
  end

  // Called and returning at a falling edge; the instruction is taken at the
  // rising edge after the first falling edge that sees in_ready.
  task automatic issue(instr_e op, logic [K:0] m);
    in_valid = 1'b1;
    in_op    = op;
    in_m     = m;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic wait_quiet();
    @(negedge clk);
    while (!quiet) @(negedge clk);
  endtask

  initial begin
    longint a0, ph, msum, got, expv;
    logic signed [127:0] wa, wp, wm, wg, we;
    logic [K:0] rd [N];
    logic [K:0] m;
    int nrd, t_first, t_last, nacc;
    checks = 0; failures = 0; n_stall = 0; n_overlap = 0; n_ovf = 0; n_neg = 0;
    done = 1'b0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    in_op = INS_LOAD;
    in_m = '0;
    for (int i = 0; i < N; i++) begin
      in_a[i] = '0;
      in_phi[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int r = 0; r < ROUNDS; r++) begin
      // LOAD
      for (int i = 0; i < N; i++) begin
        in_a[i]   = (K+1)'($urandom);
        in_phi[i] = (K+1)'($urandom);
        if (r % 3 == 0) in_phi[i][K-1:0] = '1;  // drive large products
      end
      a0 = numv(in_a);
      ph = numv(in_phi);
      issue(INS_LOAD, '0);
      wait_quiet();
      checks++;
      if (acc != in_a || phi != in_phi) begin
        failures++;
        $display("FAIL round %0d: LOAD placed digits wrongly", r);
      end

      // Burst of MADDs, issued back to back
      msum = 0;
      nacc = 0;
      t_first = 0;
      t_last = 0;
      for (int b = 0; b < BURST; b++) begin
        m = (K+1)'($urandom);
        if (b == 0) m[K-1:0] = '1;
        if (b == 1) m = {1'b1, {K{1'b1}}};
        if (m[K] && m[K-1:0] != 0) n_neg++;
        msum += sdv(m);
        issue(INS_MADD, m);
        nacc++;
        if (b == 1) t_first = int'($time);
        if (b == BURST - 1) t_last = int'($time);
      end
      wait_quiet();
      if (ovf) n_ovf++;
      checks++;
      if (BURST > 2 && (t_last - t_first) != (BURST - 2) * (ALPHA + 2) * 10) begin
        failures++;
        $display("FAIL round %0d: MADD period %0d ns over %0d, expected %0d cycles each",
                 r, t_last - t_first, BURST - 2, ALPHA + 2);
      end

      // READ
      nrd = 0;
      fork
        issue(INS_READ, '0);
        begin
          while (nrd < N) begin
            @(negedge clk);
            if (rd_valid) begin
              rd[nrd] = rd_digit;
              nrd++;
            end
          end
        end
      join
      wait_quiet();
      got  = numv(rd) + longint'(xfer_acc) * (longint'(1) << (K * N));
      expv = a0 + msum * ph;
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL round %0d: A = %0d (xfer %0d), expected %0d", r, got, xfer_acc, expv);
      end
      checks++;
      if (numv(acc) != 0) begin
        failures++;
        $display("FAIL round %0d: A not cleared by READ", r);
      end

      // MUL: A <- r^N * A + M * PHI, upper half in xfer_acc
      for (int i = 0; i < N; i++) in_a[i] = (K+1)'($urandom);
      issue(INS_LOAD, '0);
      wait_quiet();
      wa = wide(in_a);
      wp = wide(in_phi);
      for (int i = 0; i < N; i++) begin
        in_a[i] = (K+1)'($urandom);
        if (r % 4 == 1) in_a[i][K-1:0] = '1;
      end
      wm = wide(in_a);
      issue(INS_MUL, '0);
      wait_quiet();
      nrd = 0;
      fork
        issue(INS_READ, '0);
        begin
          while (nrd < N) begin
            @(negedge clk);
            if (rd_valid) begin
              rd[nrd] = rd_digit;
              nrd++;
            end
          end
        end
      join
      wait_quiet();
      wg = wide(rd) + (128'(xfer_acc) <<< (K * N));
      we = (wa <<< (K * N)) + wm * wp;
      checks++;
      if (wg != we) begin
        failures++;
        $display("FAIL round %0d: MUL gives %0d, expected %0d", r, wg, we);
      end
    end
    done = 1'b1;
  end
endmodule
