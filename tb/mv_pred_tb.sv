// mv_pred_tb: random neighbour MVs, reference indices, availability and partition shapes
// into mv_pred, compared with the H.264 predictor rules written out in the testbench.
module mv_pred_tb;
  import h264_pkg::*;
  mv_t mv_a, mv_b, mv_c, mv_d, mvp;
  logic signed [7:0] ref_a, ref_b, ref_c, ref_d, cur_ref;
  logic avail_a, avail_b, avail_c, avail_d; logic [2:0] shape;
  mv_pred dut (.*);
  int checks = 0, failures = 0;

  function automatic int med(input int a, input int b, input int c);
    int t;
    if (a > b) begin t = a; a = b; b = t; end
    if (b > c) begin t = b; b = c; c = t; end
    if (a > b) begin t = a; a = b; b = t; end
    return b;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int ax, ay, bx, by, cx, cy, ra, rb, rc, ex, ey, n;
      mv_a.x = 16'($urandom_range(0, 200) - 100); mv_a.y = 16'($urandom_range(0, 200) - 100);
      mv_b.x = 16'($urandom_range(0, 200) - 100); mv_b.y = 16'($urandom_range(0, 200) - 100);
      mv_c.x = 16'($urandom_range(0, 200) - 100); mv_c.y = 16'($urandom_range(0, 200) - 100);
      mv_d.x = 16'($urandom_range(0, 200) - 100); mv_d.y = 16'($urandom_range(0, 200) - 100);
      ref_a = 8'($urandom_range(0, 2)); ref_b = 8'($urandom_range(0, 2));
      ref_c = 8'($urandom_range(0, 2)); ref_d = 8'($urandom_range(0, 2));
      cur_ref = 8'($urandom_range(0, 2));
      {avail_a, avail_b, avail_c, avail_d} = 4'($urandom);
      shape = 3'($urandom_range(0, 4));
      #1;
      ax = avail_a ? mv_a.x : 0; ay = avail_a ? mv_a.y : 0; ra = avail_a ? ref_a : -1;
      bx = avail_b ? mv_b.x : 0; by = avail_b ? mv_b.y : 0; rb = avail_b ? ref_b : -1;
      if (avail_c)      begin cx = mv_c.x; cy = mv_c.y; rc = ref_c; end
      else if (avail_d) begin cx = mv_d.x; cy = mv_d.y; rc = ref_d; end
      else              begin cx = 0; cy = 0; rc = -1; end
      if (shape == 1 && rb == cur_ref)      begin ex = bx; ey = by; end
      else if (shape == 2 && ra == cur_ref) begin ex = ax; ey = ay; end
      else if (shape == 3 && ra == cur_ref) begin ex = ax; ey = ay; end
      else if (shape == 4 && rc == cur_ref) begin ex = cx; ey = cy; end
      else begin
        if (!avail_b && !avail_c && !avail_d && avail_a) begin
          bx = ax; by = ay; rb = ra; cx = ax; cy = ay; rc = ra;
        end
        n = (ra == cur_ref) + (rb == cur_ref) + (rc == cur_ref);
        if (n == 1 && ra == cur_ref)      begin ex = ax; ey = ay; end
        else if (n == 1 && rb == cur_ref) begin ex = bx; ey = by; end
        else if (n == 1)                  begin ex = cx; ey = cy; end
        else begin ex = med(ax, bx, cx); ey = med(ay, by, cy); end
      end
      checks++;
      if (int'(mvp.x) != ex || int'(mvp.y) != ey) begin
        failures++;
        $display("FAIL t=%0d shape %0d: got (%0d,%0d) exp (%0d,%0d)", t, shape, mvp.x, mvp.y, ex, ey);
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
