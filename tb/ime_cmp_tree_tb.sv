// ime_cmp_tree_tb: feeds groups of candidate SADs and MV costs into ime_cmp_tree and
// checks, for all 41 block sizes, that the kept best is the smallest SAD + cost seen since
// the last clear, the earliest one winning ties (earlier group, then lower candidate index).
// Small value ranges make ties frequent.
module ime_cmp_tree_tb;
  import h264_pkg::*;
  localparam int NC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid;
  logic [SAD_W-1:0] sad[NC][NUM_VBS];
  logic [COST_W-1:0] cost[NC], best_cost[NUM_VBS];
  mv_t cand_mv[NC], best_mv[NUM_VBS];
  int mc[NUM_VBS], mx[NUM_VBS], my[NUM_VBS];
  int checks = 0, failures = 0;

  ime_cmp_tree dut (.clk, .rst_n, .clear, .in_valid, .sad, .cost, .cand_mv,
                                  .best_cost, .best_mv);

  initial begin
    clear = 0; in_valid = 0;
    for (int k = 0; k < NC; k++) begin
      cost[k] = 0; cand_mv[k] = '0;
      for (int b = 0; b < NUM_VBS; b++) sad[k][b] = 0;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t % 20 == 0) begin
        clear = 1; in_valid = 0;
        for (int b = 0; b < NUM_VBS; b++) begin mc[b] = 1 << COST_W; mx[b] = 0; my[b] = 0; end
      end else begin
        int rng;
        clear = 0; in_valid = ($urandom_range(0, 4) != 0);
        rng = (t % 40 < 20) ? 20 : 3000;
        for (int k = 0; k < NC; k++) begin
          cost[k] = COST_W'($urandom_range(0, rng));
          cand_mv[k].x = 16'(t * 8 + k); cand_mv[k].y = 16'(-t);
          for (int b = 0; b < NUM_VBS; b++) sad[k][b] = SAD_W'($urandom_range(0, rng));
        end
        if (in_valid)
          for (int b = 0; b < NUM_VBS; b++)
            for (int k = 0; k < NC; k++)
              if (int'(sad[k][b]) + int'(cost[k]) < mc[b]) begin
                mc[b] = int'(sad[k][b]) + int'(cost[k]); mx[b] = t * 8 + k; my[b] = -t;
              end
      end
      @(negedge clk);
      clear = 0; in_valid = 0;
      if (t % 20 != 0)
        for (int b = 0; b < NUM_VBS; b++) begin
          if (mc[b] == (1 << COST_W)) continue;
          checks++;
          if (int'(best_cost[b]) != mc[b] || int'(best_mv[b].x) != mx[b] || int'(best_mv[b].y) != my[b]) begin
            failures++;
            if (failures < 10) $display("FAIL t %0d blk %0d: %0d (%0d) exp %0d (%0d)", t, b, best_cost[b], best_mv[b].x, mc[b], mx[b]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
