// ime_mv_cost: modified motion vector predictor and the MV cost generator of the integer
// motion estimator.
//
// The exact H.264 predictor of a block needs the final MVs of its left neighbours, which
// are not known while the previous macroblock is still in the FME stage. Following the
// document, one predictor serves all 41 blocks of the macroblock: the component-wise
// median of MV0, MV1 and MV2, taken from the upper-left, upper and upper-right
// macroblocks. With one predictor per macroblock, the rate term is the same for all 41
// blocks of a candidate, so one cost per candidate is enough. The cost is
// lambda * (bits of se(mvd.x) + bits of se(mvd.y)), the usual Lagrangian rate term with
// Exp-Golomb code lengths; the document does not print the formula, so this is this
// design's choice. Interface (combinational): mv0..mv2 and mvp in quarter pixels,
// cand_mv in whole pixels, cost per candidate.
module ime_mv_cost
  import h264_pkg::*;
#(
  parameter int NCAND = 8
) (
  input  mv_t              mv0,
  input  mv_t              mv1,
  input  mv_t              mv2,
  input  logic [7:0]       lambda,
  input  mv_t              cand_mv [NCAND],
  output mv_t              mvp,
  output logic [COST_W-1:0] cost   [NCAND]
);

  function automatic logic signed [15:0] med3(input logic signed [15:0] a,
                                              input logic signed [15:0] b,
                                              input logic signed [15:0] c);
    logic signed [15:0] mx, mn;
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    if (c > mx)      return mx;
    else if (c < mn) return mn;
    else             return c;
  endfunction

  always_comb begin
    mvp.x = med3(mv0.x, mv1.x, mv2.x);
    mvp.y = med3(mv0.y, mv1.y, mv2.y);
    for (int k = 0; k < NCAND; k++) begin
      int dx, dy, bits;
      dx = 4 * int'(cand_mv[k].x) - int'(mvp.x);
      dy = 4 * int'(cand_mv[k].y) - int'(mvp.y);
      bits = se_len(dx) + se_len(dy);
      cost[k] = COST_W'(int'(lambda) * bits);
    end
  end

endmodule
