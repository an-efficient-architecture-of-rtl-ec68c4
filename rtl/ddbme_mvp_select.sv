// ddbme_mvp_select: motion vector predictor for shape (MVPs).
//
// The candidates are, in priority order, the shape MVs of the left, upper and
// upper-right BABs (MVs1, MVs2, MVs3) and then the texture MVs of the
// neighbouring blocks (MV1, MV2, MV3). The predictor is the first candidate
// whose valid flag is set, or (0,0) when none is. This priority rule is the
// published one; which neighbour feeds which input is left to the encoder
// that drives the ports. Purely combinational.
//
// Interface: cand[0..5] in the order above with cand_valid[0..5]; mvp out,
// from_cand set when a candidate was used.
module ddbme_mvp_select
  import ddbme_pkg::*;
(
  input  mv_t        cand [6],
  input  logic [5:0] cand_valid,
  output mv_t        mvp,
  output logic       from_cand
);

  always_comb begin
    mvp       = '0;
    from_cand = 1'b0;
    for (int c = 5; c >= 0; c--) begin
      if (cand_valid[c]) begin
        mvp       = cand[c];
        from_cand = 1'b1;
      end
    end
  end

endmodule
