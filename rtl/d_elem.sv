// d_elem: D-element. Decomposes a redundant binary digit (SM_b) into a
// positive binary output p in (0,1) and a negative binary output n in (0,-1),
// d = p - n. The document gives the function (Figures 5 and 7); the gates are
// this design's own. Purely combinational.
module d_elem
  import sd_pkg::*;
(
  input  rb_t  d,
  output logic p,
  output logic n
);
  always_comb begin
    p = d.m & ~d.s;
    n = d.m & d.s;
  end
endmodule
