// ime_engine_tb: self-checking test of the integer motion estimator at a reduced search
// range (H[-16,+15], V[-8,+7]) on a 64x48 frame. A local-bus model returns frame pixels
// one cycle after each request, with random stalls. For each macroblock a software full
// search over the same candidates, with the same 5-bit truncation, checkerboard
// sub-sampling and MV cost, gives the expected best cost and MV of all 41 blocks in the
// hardware's scan order. Also checked: the number of pixels loaded (whole window for the
// first MB of a row, 16 new columns after), the search cycle count
// (groups * (2*sr_v + 15) + 5), a smaller runtime search range, and the Integer MV Buffer.
module ime_engine_tb;
  import h264_pkg::*;

  localparam int SRH = 16, SRV = 8, NC = 8, FW = 64, FH = 48;
  localparam int COLS = 2*SRH+16, ROWS = 2*SRV+15;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cur_we; logic [3:0] cur_row; pixel_t cur_data[16];
  logic start; logic [7:0] mb_x, mb_y, sr_h, sr_v, lambda; logic [1:0] ref_idx;
  logic busy, done, ext_req, ext_ready; logic [11:0] ext_x, ext_y; pixel_t ext_rdata;
  logic upd_we; logic [7:0] upd_mbx; mv_t upd_mv_left, upd_mv_right;
  mv_t best_mv[NUM_VBS]; logic [COST_W-1:0] best_cost[NUM_VBS]; mv_t int_mv[4][NUM_VBS];
  logic [31:0] sw_loaded;

  ime_engine #(.SRH(SRH), .SRV(SRV), .MAX_MB_W(8)) dut (
    .clk, .rst_n, .cur_we, .cur_row, .cur_data, .start, .mb_x, .mb_y,
    .frame_w(12'(FW)), .frame_h(12'(FH)), .sr_h, .sr_v, .ref_idx, .lambda,
    .busy, .done, .ext_req, .ext_x, .ext_y, .ext_ready, .ext_rdata,
    .upd_we, .upd_mbx, .upd_mv_left, .upd_mv_right, .best_mv, .best_cost, .int_mv, .sw_loaded);

  pixel_t frame[FH][FW];
  pixel_t cmb[16][16];
  int checks = 0, failures = 0;
  int cyc = 0;
  bit random_stall = 1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    ext_ready <= random_stall ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (ext_req && ext_ready) ext_rdata <= frame[ext_y][ext_x];
  end

  function automatic int sel(input int k);
    return $clog2(k + 2) - 1;
  endfunction
  function automatic int selen(input int v);
    int k; k = (v > 0) ? 2*v - 1 : -2*v;
    return 2 * sel(k) + 1;
  endfunction
  function automatic int med(input int a, input int b, input int c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction
  function automatic int refpix(input int x, input int y);
    int cx, cy;
    cx = x < 0 ? 0 : (x >= FW ? FW-1 : x);
    cy = y < 0 ? 0 : (y >= FH ? FH-1 : y);
    return int'(frame[cy][cx]);
  endfunction

  // block geometry of VBS index b: x0, y0 (in 4x4 units), w, h (in 4x4 units)
  task automatic geom(input int b, output int x0, output int y0, output int w, output int h);
    if (b < 16)      begin x0 = b%4; y0 = b/4; w = 1; h = 1; end
    else if (b < 24) begin x0 = ((b-16)%2)*2; y0 = (b-16)/2; w = 2; h = 1; end
    else if (b < 32) begin x0 = (b-24)%4; y0 = ((b-24)/4)*2; w = 1; h = 2; end
    else if (b < 36) begin x0 = ((b-32)%2)*2; y0 = ((b-32)/2)*2; w = 2; h = 2; end
    else if (b < 38) begin x0 = 0; y0 = (b-36)*2; w = 4; h = 2; end
    else if (b < 40) begin x0 = (b-38)*2; y0 = 0; w = 2; h = 4; end
    else             begin x0 = 0; y0 = 0; w = 4; h = 4; end
  endtask

  int exp_cost[NUM_VBS], exp_mx[NUM_VBS], exp_my[NUM_VBS];
  int mvpx, mvpy;
  int ulx[4], uly[4], urx[4], ury[4];

  task automatic ref_search(input int mbx, input int mby, input int srh, input int srv, input int lam);
    for (int b = 0; b < NUM_VBS; b++) exp_cost[b] = 32'h7fffffff;
    for (int g = 0; g < 2*srh/NC; g++)
      for (int dy = srv-1; dy >= -srv; dy--)
        for (int k = 0; k < NC; k++) begin
          int dx, mc;
          dx = -srh + g*NC + k;
          mc = lam * (selen(4*dx - mvpx) + selen(4*dy - mvpy));
          for (int b = 0; b < NUM_VBS; b++) begin
            int x0, y0, w, h, s;
            geom(b, x0, y0, w, h);
            s = 0;
            for (int y = y0*4; y < (y0+h)*4; y++)
              for (int x = x0*4; x < (x0+w)*4; x++)
                if (((x + y) & 1) == 0) begin
                  int a, r;
                  a = int'(cmb[y][x]) >> 3;
                  r = refpix(mbx*16 + x + dx, mby*16 + y + dy) >> 3;
                  s += (a > r) ? a - r : r - a;
                end
            if (s + mc < exp_cost[b]) begin
              exp_cost[b] = s + mc; exp_mx[b] = dx; exp_my[b] = dy;
            end
          end
        end
  endtask

  int t_start, t_lddone, t_done;
  always @(posedge clk) if (dut.ld_done) t_lddone = cyc;

  task automatic run_mb(input int mbx, input int mby, input int srh, input int srv,
                        input int lam, input int refi, input bit full_load);
    int mdx, mdy, l0;
    // current MB: a displaced copy of the reference plus small noise
    mdx = $urandom_range(0, 2*srh-1) - srh; mdy = $urandom_range(0, 2*srv-1) - srv;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cmb[y][x] = pixel_t'(refpix(mbx*16 + x + mdx, mby*16 + y + mdy) + $urandom_range(0, 3));
    for (int y = 0; y < 16; y++) begin
      @(negedge clk);
      cur_we = 1; cur_row = 4'(y);
      for (int x = 0; x < 16; x++) cur_data[x] = cmb[y][x];
    end
    @(negedge clk); cur_we = 0;
    l0 = sw_loaded;
    // modified MVP: median of the upper-left, upper and upper-right MB MVs
    if (mby == 0) begin mvpx = 0; mvpy = 0; end
    else begin
      mvpx = med(mbx > 0 ? urx[mbx-1] : 0, ulx[mbx], (mbx+1)*16 < FW ? ulx[mbx+1] : 0);
      mvpy = med(mbx > 0 ? ury[mbx-1] : 0, uly[mbx], (mbx+1)*16 < FW ? uly[mbx+1] : 0);
    end
    mb_x = 8'(mbx); mb_y = 8'(mby); sr_h = 8'(srh); sr_v = 8'(srv); lambda = 8'(lam);
    ref_idx = 2'(refi);
    start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t_done = cyc;
    ref_search(mbx, mby, srh, srv, lam);
    for (int b = 0; b < NUM_VBS; b++) begin
      checks++;
      if (int'(best_cost[b]) != exp_cost[b] || int'(best_mv[b].x) != exp_mx[b] ||
          int'(best_mv[b].y) != exp_my[b]) begin
        failures++;
        $display("FAIL mb(%0d,%0d) blk %0d: got cost %0d mv (%0d,%0d) exp %0d (%0d,%0d)", mbx, mby, b,
                 best_cost[b], best_mv[b].x, best_mv[b].y, exp_cost[b], exp_mx[b], exp_my[b]);
      end
      checks++;
      if (int_mv[refi][b] != best_mv[b]) failures++;
    end
    checks++;
    if (int'(sw_loaded - l0) != (full_load ? (COLS-1)*ROWS : 16*ROWS)) begin
      failures++; $display("FAIL loaded %0d", sw_loaded - l0);
    end
    checks++;
    if (t_done - t_lddone != (2*srh/NC)*(2*srv+15) + 6) begin
      failures++; $display("FAIL search cycles %0d", t_done - t_lddone);
    end
  endtask

  initial begin
    cur_we = 0; start = 0; upd_we = 0; upd_mbx = 0; upd_mv_left = '0; upd_mv_right = '0;
    cur_row = 0; mb_x = 0; mb_y = 0; sr_h = 0; sr_v = 0; lambda = 0; ref_idx = 0;
    for (int i = 0; i < 16; i++) cur_data[i] = 0;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        frame[y][x] = pixel_t'($urandom_range(0, 255));
    repeat (3) @(negedge clk); rst_n = 1;
    run_mb(0, 0, SRH, SRV, 4, 0, 1);
    run_mb(1, 0, SRH, SRV, 4, 0, 0);
    run_mb(2, 0, SRH, SRV, 4, 0, 0);
    // upper MVs for row 1 (quarter pixels)
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); upd_we = 1; upd_mbx = 8'(i);
      upd_mv_left.x = 16'(4*i + 3);  upd_mv_left.y = 16'(-2*i);
      upd_mv_right.x = 16'(-5*i);    upd_mv_right.y = 16'(7 - i);
      ulx[i] = 4*i + 3; uly[i] = -2*i; urx[i] = -5*i; ury[i] = 7 - i;
    end
    @(negedge clk); upd_we = 0;
    // row 1 in raster order; MB (2,1) has all three upper neighbours
    random_stall = 0;
    run_mb(0, 1, SRH, SRV, 6, 1, 1);
    run_mb(1, 1, SRH, SRV, 6, 1, 0);
    run_mb(2, 1, SRH, SRV, 6, 1, 0);
    run_mb(3, 1, 8, 4, 2, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
