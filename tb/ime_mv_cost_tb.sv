// ime_mv_cost_tb: random neighbour MVs, lambdas and candidate positions for ime_mv_cost.
// The predictor must be the component-wise median of the three neighbour MVs and each
// cost lambda times the signed Exp-Golomb code lengths of both MV difference components
// (candidates are in integer pixels, the predictor in quarter pixels). The code length is
// computed here by counting bits of the code number.
module ime_mv_cost_tb;
  import h264_pkg::*;
  localparam int NC = 8;
  mv_t mv0, mv1, mv2, mvp, cand_mv[NC];
  logic [7:0] lambda;
  logic [COST_W-1:0] cost[NC];
  int checks = 0, failures = 0;

  ime_mv_cost dut (.mv0, .mv1, .mv2, .lambda, .cand_mv, .mvp, .cost);

  function automatic int codelen(input int v);
    int k, n;
    k = (v > 0) ? 2*v - 1 : -2*v;
    n = 0;
    while ((k + 1) >> (n + 1) != 0) n++;
    return 2*n + 1;
  endfunction
  function automatic int med(input int a, input int b, input int c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r, px, py;
      r = (t % 3 == 0) ? 8 : 400;
      mv0.x = 16'($urandom_range(0, 2*r) - r); mv0.y = 16'($urandom_range(0, 2*r) - r);
      mv1.x = 16'($urandom_range(0, 2*r) - r); mv1.y = 16'($urandom_range(0, 2*r) - r);
      mv2.x = 16'($urandom_range(0, 2*r) - r); mv2.y = 16'($urandom_range(0, 2*r) - r);
      lambda = 8'($urandom);
      for (int k = 0; k < NC; k++) begin
        cand_mv[k].x = 16'($urandom_range(0, 128) - 64);
        cand_mv[k].y = 16'($urandom_range(0, 64) - 32);
      end
      #1;
      px = med(mv0.x, mv1.x, mv2.x); py = med(mv0.y, mv1.y, mv2.y);
      checks++;
      if (int'(mvp.x) != px || int'(mvp.y) != py) begin failures++; $display("FAIL mvp"); end
      for (int k = 0; k < NC; k++) begin
        int e;
        e = int'(lambda) * (codelen(4*int'(cand_mv[k].x) - px) + codelen(4*int'(cand_mv[k].y) - py));
        checks++;
        if (int'(cost[k]) != e) begin failures++; $display("FAIL cost[%0d] %0d exp %0d", k, cost[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
