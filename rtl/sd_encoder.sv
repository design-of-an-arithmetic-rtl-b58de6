// sd_encoder: converts the K redundant binary result digits of the MIRBAs
// (weights 2^0..2^(K-1), SM_b) into one SM_r digit {sign, magnitude}.
//
// It is a one-dimensional iterative array of identical cells, one per bit.
// Two chains run through the cells:
//  - a sign chain from the most significant cell down: the sign of the result
//    is the sign of the most significant nonzero digit (0 for a zero result);
//  - a borrow chain from the least significant cell up: every cell turns its
//    digit into e = +/-d, so that the sum of the e's is the magnitude, and
//    subtracts with a borrow, giving one magnitude bit per cell.
// Because |sum| <= 2^K - 1 the last borrow is always 0.
// The document gives the function and an iterative structure; the cell logic
// is this design's own. Purely combinational.
module sd_encoder
  import sd_pkg::*;
#(
  parameter int K = 5
) (
  input  rb_t        d [K],
  output logic [K:0] q        // q[K] sign, q[K-1:0] magnitude
);
  logic [K:0] found;   // a nonzero digit at this weight or above
  logic [K:0] neg;     // sign of the most significant nonzero digit so far
  logic       bw;      // borrow running up the cells
  logic       ep, en;  // a cell's digit, sign-corrected, as (0,1) / (0,-1)

  always_comb begin
    found[K] = 1'b0;
    neg[K]   = 1'b0;
    for (int c = K - 1; c >= 0; c--) begin
      found[c] = found[c+1] | d[c].m;
      neg[c]   = found[c+1] ? neg[c+1] : (d[c].m & d[c].s);
    end
    bw = 1'b0;
    for (int c = 0; c < K; c++) begin
      ep   = d[c].m & ~(d[c].s ^ neg[0]);
      en   = d[c].m &  (d[c].s ^ neg[0]);
      q[c] = ep ^ en ^ bw;
      bw   = (en & ~ep) | (bw & ~(ep & ~en));
    end
    q[K] = neg[0];
  end
endmodule
