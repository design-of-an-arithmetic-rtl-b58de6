// rba3: three-input redundant binary adder (RBA-3).
//
// The lower Borovec unit acts as a redundant binary (3,2) counter: two of the
// operands enter as its data inputs and the third, split by a D-element,
// enters on its transfer inputs. Its transfer outputs, joined by a C-element,
// form one redundant binary digit cout of twice the weight, which goes to the
// RBA-3 of the next more significant column. The upper Borovec unit adds the
// lower unit's sum and the cin digit arriving from the less significant
// column, with an ordinary transfer pair tin/tout.
//   x0 + x1 + x2 + cin + tin = d + 2*(cout + tout)
// Structure as in the document (Figure 7). TF selects the Borovec unit form
// (see bu). Purely combinational.
module rba3
  import sd_pkg::*;
#(
  parameter bit TF = 1'b0
) (
  input  rb_t   x0,
  input  rb_t   x1,
  input  rb_t   x2,
  input  rb_t   cin,    // composed transfer from the less significant column
  output rb_t   cout,   // composed transfer to the more significant column
  input  xfer_t tin,    // upper unit transfers in
  output xfer_t tout,   // upper unit transfers out
  output rb_t   d
);
  xfer_t t3;      // third operand on the lower unit's transfer inputs
  xfer_t tlo;     // lower unit transfers out
  rb_t   s;       // lower unit sum

  d_elem u_d  (.d(x2), .p(t3.p), .n(t3.n));
  bu #(.TF(TF)) u_lo (.l(x0), .m(x1), .tin(t3), .tout(tlo), .d(s));
  c_elem u_c  (.p(tlo.p), .n(tlo.n), .d(cout));
  bu #(.TF(TF)) u_hi (.l(s), .m(cin), .tin(tin), .tout(tout), .d(d));
endmodule
