// tb_transfer_encoder: exhaustive test of transfer_encoder together with
// transfer_decoder, at K = 5 (RBA-3 tree, with composed slots), K = 3
// (log2-sum tree, where the decoder is a pure fan-out) and K = 4 with the
// log2-sum tree forced.
// For every combination of slot values it checks, against counts and sums
// formed here from the slot meanings ({p, n} pair or composed SM_b digit):
//   - pcnt and ncnt are the numbers of +1 and -1 transfers;
//   - the decoded slots carry the same total value pcnt - ncnt;
//   - the decoded slots hold at most pcnt positive and ncnt negative
//     transfers, filled from slot 0 upward.
module tb_transfer_encoder;
  import sd_pkg::*;
  localparam int NT = 3;
  localparam int    KS [NT] = '{5, 3, 4};
  localparam tree_e TS [NT] = '{TREE_AUTO, TREE_AUTO, TREE_LOG2};

  int checks [NT];
  int failures [NT];
  logic done [NT];

  for (genvar g = 0; g < NT; g++) begin : g_k
    localparam int K  = KS[g];
    localparam int TW = $clog2(K + 1);
    logic [1:0]    t  [K];
    logic [1:0]    td [K];
    logic [TW-1:0] pcnt, ncnt;

    transfer_encoder #(.K(K), .TREE(TS[g])) u_te (.t(t), .pcnt(pcnt), .ncnt(ncnt));
    transfer_decoder #(.K(K), .TREE(TS[g])) u_td (.pcnt(pcnt), .ncnt(ncnt), .t(td));

    initial begin
      int  ep, en, vin, vout, np, nn;
      bit  comp;
      checks[g]   = 0;
      failures[g] = 0;
      done[g]     = 1'b0;
      for (int v = 0; v < (1 << (2 * K)); v++) begin
        for (int s = 0; s < K; s++) t[s] = 2'(v >> (2 * s));
        #1;
        ep = 0; en = 0; vin = 0; vout = 0; np = 0; nn = 0;
        for (int s = 0; s < K; s++) begin
          comp = tree_slot_composed(K + 1, tree_uses_rba3(K, TS[g]), s);
          if (comp) begin
            // composed digit {s, m}: value (-1)^s * m
            if (t[s] == 2'b01) ep++;
            if (t[s] == 2'b11) en++;
            vout += (td[s] == 2'b01) ? 1 : (td[s] == 2'b11) ? -1 : 0;
            if (td[s] == 2'b01) np++;
            if (td[s] == 2'b11) nn++;
          end else begin
            // pair {p, n}
            ep += int'(t[s][1]);
            en += int'(t[s][0]);
            vout += int'(td[s][1]) - int'(td[s][0]);
            np += int'(td[s][1]);
            nn += int'(td[s][0]);
          end
        end
        vin = ep - en;
        checks[g] += 3;
        if (int'(pcnt) != ep || int'(ncnt) != en) begin
          failures[g]++;
          $display("FAIL K=%0d v=%0h: counts %0d/%0d, expected %0d/%0d", K, v, pcnt, ncnt, ep, en);
        end
        if (vout != vin) begin
          failures[g]++;
          $display("FAIL K=%0d v=%0h: decoded value %0d, expected %0d", K, v, vout, vin);
        end
        if (np > ep || nn > en) begin
          failures[g]++;
          $display("FAIL K=%0d v=%0h: decoded %0d/%0d transfers from counts %0d/%0d",
                   K, v, np, nn, ep, en);
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    #10000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int c, f;
    c = 0;
    f = 0;
    #1;
    for (int g = 0; g < NT; g++) begin
      wait (done[g]);
      c += checks[g];
      f += failures[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
