// mc_engine_tb: motion compensation of random partitions (4x4 to 16x16) with random
// quarter-pixel MVs, some pointing outside the 64x48 frame, against the reference
// quarter-pixel samples of h264_tb_ref. Also checks that each partition reads exactly its
// classified window ((X+5 or X) by (Y+5 or Y) pixels) and the cycle count
// (window pixels + 4x4 blocks + 3 without bus stalls), and reports the saving against
// reading 9x9 pixels per 4x4 block.
module mc_engine_tb;
  import h264_pkg::*;
  import h264_tb_ref::*;

  localparam int FW = 64, FH = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, ext_req, ext_ready, out_valid, done;
  logic [11:0] blk_x, blk_y, ext_x, ext_y; logic [2:0] part_w4, part_h4;
  mv_t mv; pixel_t ext_rdata; logic [1:0] out_bx, out_by; pixel_t out_pred[4][4];
  logic [31:0] fetched;

  mc_engine dut (.*, .frame_w(12'(FW)), .frame_h(12'(FH)));

  int checks = 0, failures = 0, cyc = 0;
  bit stall = 0;
  longint tot_fetch = 0, tot_naive = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    ext_ready <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (ext_req && ext_ready) ext_rdata <= rf[ext_y][ext_x];
  end

  task automatic run(input int bxp, input int byp, input int w4, input int h4,
                     input int mvx, input int mvy);
    int f0, t0, nblk, expw, exph;
    f0 = fetched;
    @(negedge clk);
    blk_x = 12'(bxp); blk_y = 12'(byp); part_w4 = 3'(w4); part_h4 = 3'(h4);
    mv.x = 16'(mvx); mv.y = 16'(mvy); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    nblk = 0;
    while (1) begin
      if (out_valid) begin
        nblk++;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int e;
            e = qsample(4*(bxp + 4*int'(out_bx) + x) + mvx, 4*(byp + 4*int'(out_by) + y) + mvy);
            checks++;
            if (int'(out_pred[y][x]) != e) begin
              failures++;
              $display("FAIL part %0dx%0d mv (%0d,%0d) blk (%0d,%0d) px (%0d,%0d): got %0d exp %0d",
                       w4*4, h4*4, mvx, mvy, out_bx, out_by, x, y, out_pred[y][x], e);
            end
          end
        if (done) break;
      end
      @(negedge clk);
    end
    expw = 4*w4 + ((mvx & 3) != 0 ? 5 : 0);
    exph = 4*h4 + ((mvy & 3) != 0 ? 5 : 0);
    checks++;
    if (nblk != w4*h4 || int'(fetched) - f0 != expw*exph) begin
      failures++;
      $display("FAIL part %0dx%0d: %0d blocks, %0d pixels fetched (exp %0d)", w4*4, h4*4, nblk,
               int'(fetched) - f0, expw*exph);
    end
    if (!stall) begin
      checks++;
      if (cyc - t0 != expw*exph + w4*h4 + 3) begin
        failures++; $display("FAIL cycles %0d", cyc - t0);
      end
    end
    tot_fetch += expw*exph; tot_naive += 81*w4*h4;
  endtask

  initial begin
    int sizes[7][2] = '{'{1,1}, '{2,1}, '{1,2}, '{2,2}, '{4,2}, '{2,4}, '{4,4}};
    start = 0; blk_x = 0; blk_y = 0; part_w4 = 1; part_h4 = 1; mv = '0;
    rf_w = FW; rf_h = FH;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) rf[y][x] = pixel_t'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int s, bx, by;
      s = $urandom_range(0, 6);
      bx = 16 * $urandom_range(0, 3); by = 16 * $urandom_range(0, 2);
      stall = (t >= 40);
      run(bx, by, sizes[s][0], sizes[s][1], $urandom_range(0, 80) - 40, $urandom_range(0, 80) - 40);
    end
    // every fraction once on a 4x4 block
    for (int f = 0; f < 16; f++) run(20, 12, 1, 1, 4*3 + f%4, -4*2 + f/4);
    $display("fetched %0d pixels, 9x9 per 4x4 block would read %0d", tot_fetch, tot_naive);
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
