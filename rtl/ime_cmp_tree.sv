// ime_cmp_tree: the 41-parallel, NCAND-input comparator tree array of the integer motion
// estimator, with the registers that keep the best cost and MV of each of the 41 blocks.
//
// Each cycle, for every one of the 41 partitions, the costs SAD + MV cost of the NCAND
// candidates are reduced by a binary tree of comparators to the lowest one, and that
// winner replaces the stored best if it is strictly lower. Ties inside the tree go to
// the lower candidate index, and a tie with the stored best keeps the stored one, so the
// first candidate met in scan order wins; the tie rule is this design's choice.
// Interface: clear (one cycle) resets all best costs to the maximum before a new search;
// in_valid marks a cycle whose sad/cost/cand_mv hold NCAND evaluated candidates; best_cost
// and best_mv are the registered results, valid one cycle after the last in_valid.
module ime_cmp_tree
  import h264_pkg::*;
#(
  parameter int NCAND = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [SAD_W-1:0]  sad      [NCAND][NUM_VBS],
  input  logic [COST_W-1:0] cost     [NCAND],
  input  mv_t               cand_mv  [NCAND],
  output logic [COST_W-1:0] best_cost[NUM_VBS],
  output mv_t               best_mv  [NUM_VBS]
);

  logic [COST_W-1:0] win_cost [NUM_VBS];
  mv_t               win_mv   [NUM_VBS];

  // Comparator tree: NCAND leaves reduced pairwise, lower index kept on ties.
  always_comb begin
    for (int b = 0; b < NUM_VBS; b++) begin
      logic [COST_W-1:0] tc [NCAND];
      mv_t               tm [NCAND];
      for (int k = 0; k < NCAND; k++) begin
        tc[k] = COST_W'(sad[k][b]) + cost[k];
        tm[k] = cand_mv[k];
      end
      for (int step = 1; step < NCAND; step = step * 2) begin
        for (int k = 0; k + step < NCAND; k = k + 2 * step) begin
          if (tc[k + step] < tc[k]) begin
            tc[k] = tc[k + step];
            tm[k] = tm[k + step];
          end
        end
      end
      win_cost[b] = tc[0];
      win_mv[b]   = tm[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_VBS; b++) begin
        best_cost[b] <= '1;
        best_mv[b]   <= '0;
      end
    end else if (clear) begin
      for (int b = 0; b < NUM_VBS; b++) begin
        best_cost[b] <= '1;
        best_mv[b]   <= '0;
      end
    end else if (in_valid) begin
      for (int b = 0; b < NUM_VBS; b++) begin
        if (win_cost[b] < best_cost[b]) begin
          best_cost[b] <= win_cost[b];
          best_mv[b]   <= win_mv[b];
        end
      end
    end
  end

endmodule
