// c_elem: C-element. Composes a positive binary (0,1) and a negative binary
// (0,-1) into one redundant binary digit in SM_b form, d = p - n.
// The document gives the function of this element (Figures 5 and 7); the two
// gates below are this design's own realisation. Purely combinational.
module c_elem
  import sd_pkg::*;
(
  input  logic p,   // weight +1
  input  logic n,   // weight -1
  output rb_t  d
);
  always_comb begin
    d.m = p ^ n;
    d.s = n & ~p;
  end
endmodule
