// transfer_encoder: Transfer Encoder (TE) on the AT output of a DPM.
//
// The K transfer slots leaving the most significant MIRBA of a DPM (AT_(i-1))
// hold K positive (0,1) and K negative (0,-1) transfers of equal weight. For
// the value seen by the next DPM only their number matters, so the encoder
// counts the positive ones and the negative ones separately, into two
// ceil(log2(K+1))-bit binary numbers: 2*ceil(log2(K+1)) pins for AT instead of
// 2K. A slot of an RBA-3 lower unit carries a composed SM_b digit {s, m}
// instead of a {p, n} pair; it is split by a D-element first
// (p = m & ~s, n = m & s).
// The document proposes this encoder to cut the pin count and builds it from
// at most K binary full adders; here each count is written as a plain sum of
// bits, which synthesis maps onto an adder tree.
// Ports: t (K slots, as produced by mirba), pcnt / ncnt (counts).
// Purely combinational.
module transfer_encoder
  import sd_pkg::*;
#(
  parameter int    K    = 5,
  parameter tree_e TREE = TREE_AUTO,
  localparam int   TW   = $clog2(K + 1)
) (
  input  logic [1:0]    t [K],
  output logic [TW-1:0] pcnt,
  output logic [TW-1:0] ncnt
);
  localparam logic [31:0] COMPOSED = tree_composed_mask(K, TREE);

  always_comb begin
    pcnt = '0;
    ncnt = '0;
    for (int s = 0; s < K; s++) begin
      logic p, n;
      if (COMPOSED[s]) begin
        p = t[s][0] & ~t[s][1];
        n = t[s][0] & t[s][1];
      end else begin
        p = t[s][1];
        n = t[s][0];
      end
      pcnt += TW'(p);
      ncnt += TW'(n);
    end
  end
endmodule
