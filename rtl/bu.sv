// bu: Borovec unit, the two-input redundant binary adder (RBA-2) cell.
//
// Adds two redundant binary digits l and m (SM_b) and an incoming transfer
// pair tin (t+ in (0,1), t- in (0,-1), from the next less significant
// position) and produces a result digit d and an outgoing transfer pair tout
// (weight 2) so that   l + m + tin.p - tin.n = d + 2*(tout.p - tout.n).
//
// Structure as in the document: a D-element splits m into its positive and
// negative parts; the symmetric subtractor adds l and the negative part and
// emits the negative transfer plus a (0,1) residue, which a C-element joins
// with the incoming negative transfer; the symmetric adder adds the positive
// part of m and emits the positive transfer plus a (0,-1) residue, which a
// second C-element joins with the incoming positive transfer to give d.
// The outgoing negative transfer depends on l and m only and the outgoing
// positive transfer also on tin.n, never on tin.p, so carries cannot ripple:
// this is what bounds the reach of a digit's result to a few neighbours.
// The equations of the document, d = l^m^t+^t-, sign(d) = not t+, match
// these gates where d is nonzero.
// With TF = 1 the same function is built the document's other way: the
// operands are converted to Transfer Format by D-elements, added by bu_tf
// (two binary full adders), and the result is converted back by a C-element.
// The transfer pairs are the same in both forms. In this form it is the
// outgoing positive transfer that depends on l and m only. Purely
// combinational.
module bu
  import sd_pkg::*;
#(
  parameter bit TF = 1'b0
) (
  input  rb_t   l,
  input  rb_t   m,
  input  xfer_t tin,
  output xfer_t tout,
  output rb_t   d
);
  if (TF) begin : g_tf
    xfer_t lt, mt, dt;
    d_elem u_dl (.d(l), .p(lt.p), .n(lt.n));
    d_elem u_dm (.d(m), .p(mt.p), .n(mt.n));
    bu_tf  u_fa (.l(lt), .m(mt), .tin(tin), .tout(tout), .d(dt));
    c_elem u_cd (.p(dt.p), .n(dt.n), .d(d));
  end else begin : g_smb
  logic mp, mn;     // D-element outputs
  logic w;          // symmetric subtractor residue, (0,1)
  rb_t  u;          // first C-element output
  logic vneg;       // symmetric adder residue, (0,-1)

  d_elem u_d (.d(m), .p(mp), .n(mn));

  // Symmetric subtractor: l - mn = 2*(-tout.n) + w
  always_comb begin
    tout.n = (l.m & l.s) | (mn & ~(l.m & ~l.s));
    w      = l.m ^ mn;
  end

  c_elem u_c1 (.p(w), .n(tin.n), .d(u));

  // Symmetric adder: u + mp = 2*tout.p - vneg
  always_comb begin
    tout.p = (u.m & ~u.s) | (mp & ~u.m);
    vneg   = u.m ^ mp;
  end

  c_elem u_c2 (.p(tin.p), .n(vneg), .d(d));
  end
endmodule
