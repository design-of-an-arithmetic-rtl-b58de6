// tb_arith_unit: end-to-end test of the arithmetic unit at its default size
// (K = 5, radix 32, N = 8 DPMs): LOAD, bursts of MADD and READ, then LOAD,
// MUL and READ, checked against integer arithmetic (see au_check), plus the
// MADD period. Every mechanism it counts
// (stall, overlapped issue, overflow transfer, negative multiplier digit)
// must have happened at least once.
module tb_arith_unit;
  logic clk = 1'b0;
  int   checks, failures, n_stall, n_overlap, n_ovf, n_neg;
  logic done;

  always #5 clk = ~clk;

  au_check #(.USE_DEFAULT(1'b1), .ROUNDS(30)) u_chk (
    .clk(clk), .checks(checks), .failures(failures), .n_stall(n_stall),
    .n_overlap(n_overlap), .n_ovf(n_ovf), .n_neg(n_neg), .done(done));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    #1;
    wait (done);
    f = failures;
    $display("mechanisms: stall=%0d overlap=%0d overflow=%0d negative_m=%0d",
             n_stall, n_overlap, n_ovf, n_neg);
    if (n_stall == 0)   f++;
    if (n_overlap == 0) f++;
    if (n_ovf == 0)     f++;
    if (n_neg == 0)     f++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, f);
    $finish;
  end
endmodule
