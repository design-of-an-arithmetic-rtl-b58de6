// bu_tf: Borovec unit for operands in Transfer Format, built from two binary
// full adders.
//
// In Transfer Format a redundant binary digit is a pair {p, n} of value
// p - n, the same form as a transfer pair. The unit adds l, m and the
// incoming transfer pair tin and produces d and an outgoing pair tout of
// weight 2 with   l + m + tin = d + 2*tout.
// Each full adder acts as a (3,2) counter, and a negative bit enters
// inverted (-x = ~x - 1):
//   FA1: l.p + ~l.n + m.p   = 2*c1 + s1
//   FA2: s1  + ~m.n + tin.p = 2*c2 + s2
// which gives tout = {c1, ~c2} and d = {s2, tin.n}. The outgoing positive
// transfer depends on l and m only, and the outgoing negative transfer also on
// tin.p. An incoming negative transfer goes straight to d. So, as in the
// SM_b unit with the roles of the signs swapped, a transfer moves at most two
// positions.
// The document states that such a unit is two cascaded full adders; the
// assignment of the inputs to the adders is this design's own.
// Purely combinational.
module bu_tf
  import sd_pkg::*;
(
  input  xfer_t l,
  input  xfer_t m,
  input  xfer_t tin,
  output xfer_t tout,
  output xfer_t d
);
  logic s1, c1, s2, c2;
  logic ln_b, mn_b;   // inverted negative bits

  always_comb begin
    ln_b = ~l.n;
    mn_b = ~m.n;
    {c1, s1} = 2'(l.p) + 2'(ln_b) + 2'(m.p);
    {c2, s2} = 2'(s1) + 2'(mn_b) + 2'(tin.p);
    tout = '{p: c1, n: ~c2};
    d    = '{p: s2, n: tin.n};
  end
endmodule
