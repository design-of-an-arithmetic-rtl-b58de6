// transfer_decoder: Transfer Decoder, the receiving half of the Transfer
// Encoder (see transfer_encoder).
//
// Turns the two transfer counts sent by the less significant DPM back into K
// transfer slots for this DPM's least significant MIRBA: positive transfer
// input s is 1 when pcnt > s, negative transfer input s when ncnt > s, so the
// slots carry pcnt positive and ncnt negative transfers of weight 1. Any such
// spread gives the same sum, since every transfer input of column 0 has the
// same weight. A slot that an RBA-3 lower unit takes as a composed SM_b digit
// gets p - n through a C-element (s = n & ~p, m = p ^ n).
// The document describes the decoder as a fan-out network in which the count
// bit of weight W drives W transfer inputs; that is exact when K + 1 is a
// power of two. The threshold form used here is this design's choice and
// works for every K (for K = 3 or 7 it reduces to the fan-out itself).
// Ports: pcnt / ncnt (counts, at most K), t (K slots, as mirba takes them).
// Purely combinational.
module transfer_decoder
  import sd_pkg::*;
#(
  parameter int    K    = 5,
  parameter tree_e TREE = TREE_AUTO,
  localparam int   TW   = $clog2(K + 1)
) (
  input  logic [TW-1:0] pcnt,
  input  logic [TW-1:0] ncnt,
  output logic [1:0]    t [K]
);
  localparam logic [31:0] COMPOSED = tree_composed_mask(K, TREE);

  always_comb begin
    for (int s = 0; s < K; s++) begin
      logic p, n;
      p = (32'(pcnt) > s);
      n = (32'(ncnt) > s);
      if (COMPOSED[s]) t[s] = {n & ~p, p ^ n};
      else             t[s] = {p, n};
    end
  end
endmodule
