// intra_pred_gen_tb: checks every intra prediction mode of intra_pred_gen (I4 modes 0..8,
// I16 modes 0..3, chroma modes 0..3) on random neighbour pixels and random neighbour
// availability against a reference written directly from the H.264 prediction equations
// in p[x,y] form. Also checks the number of output cycles per block and the latency from
// start to the first row.
module intra_pred_gen_tb;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, avail_top, avail_left, avail_tr, busy, out_valid, done;
  ip_blk_e blk; logic [3:0] mode, out_y; logic [1:0] out_xq;
  pixel_t top[16], left[16], ul, pred[4];

  intra_pred_gen dut (.*);

  int checks = 0, failures = 0;

  // p(x, -1) for x >= -1 and p(-1, y) for y >= 0
  function automatic int pt(input int x);
    if (x < 0) return int'(ul);
    if (blk == IP_I4 && x >= 4 && !avail_tr) return int'(top[3]);
    return int'(top[x]);
  endfunction
  function automatic int pl(input int y);
    if (y < 0) return int'(ul);
    return int'(left[y]);
  endfunction

  function automatic int ref_pred(input int x, input int y);
    int s, n, h, v, a, b, c, z;
    case (blk)
      IP_I4: case (mode)
        0: return pt(x);
        1: return pl(y);
        2: begin
          s = 0; for (int i = 0; i < 4; i++) s += (avail_top ? pt(i) : 0) + (avail_left ? pl(i) : 0);
          if (avail_top && avail_left) return (s + 4) >> 3;
          if (avail_top || avail_left) return (s + 2) >> 2;
          return 128;
        end
        3: if (x == 3 && y == 3) return (pt(6) + 3*pt(7) + 2) >> 2;
           else return (pt(x+y) + 2*pt(x+y+1) + pt(x+y+2) + 2) >> 2;
        4: if (x > y) return (pt(x-y-2) + 2*pt(x-y-1) + pt(x-y) + 2) >> 2;
           else if (x < y) return (pl(y-x-2) + 2*pl(y-x-1) + pl(y-x) + 2) >> 2;
           else return (pt(0) + 2*pt(-1) + pl(0) + 2) >> 2;
        5: begin
          z = 2*x - y;
          if (z >= 0 && z % 2 == 0) return (pt(x-(y>>1)-1) + pt(x-(y>>1)) + 1) >> 1;
          if (z > 0) return (pt(x-(y>>1)-2) + 2*pt(x-(y>>1)-1) + pt(x-(y>>1)) + 2) >> 2;
          if (z == -1) return (pl(0) + 2*pl(-1) + pt(0) + 2) >> 2;
          return (pl(y-1) + 2*pl(y-2) + pl(y-3) + 2) >> 2;
        end
        6: begin
          z = 2*y - x;
          if (z >= 0 && z % 2 == 0) return (pl(y-(x>>1)-1) + pl(y-(x>>1)) + 1) >> 1;
          if (z > 0) return (pl(y-(x>>1)-2) + 2*pl(y-(x>>1)-1) + pl(y-(x>>1)) + 2) >> 2;
          if (z == -1) return (pl(0) + 2*pl(-1) + pt(0) + 2) >> 2;
          return (pt(x-1) + 2*pt(x-2) + pt(x-3) + 2) >> 2;
        end
        7: if (y % 2 == 0) return (pt(x+(y>>1)) + pt(x+(y>>1)+1) + 1) >> 1;
           else return (pt(x+(y>>1)) + 2*pt(x+(y>>1)+1) + pt(x+(y>>1)+2) + 2) >> 2;
        default: begin
          z = x + 2*y;
          if (z > 5) return pl(3);
          if (z == 5) return (pl(2) + 3*pl(3) + 2) >> 2;
          if (z % 2 == 0) return (pl(y+(x>>1)) + pl(y+(x>>1)+1) + 1) >> 1;
          return (pl(y+(x>>1)) + 2*pl(y+(x>>1)+1) + pl(y+(x>>1)+2) + 2) >> 2;
        end
      endcase
      IP_I16: case (mode)
        0: return pt(x);
        1: return pl(y);
        2: begin
          s = 0; for (int i = 0; i < 16; i++) s += (avail_top ? pt(i) : 0) + (avail_left ? pl(i) : 0);
          if (avail_top && avail_left) return (s + 16) >> 5;
          if (avail_top || avail_left) return (s + 8) >> 4;
          return 128;
        end
        default: begin
          h = 0; v = 0;
          for (int i = 0; i <= 7; i++) begin
            h += (i+1) * (pt(8+i) - pt(6-i));
            v += (i+1) * (pl(8+i) - pl(6-i));
          end
          a = 16 * (pl(15) + pt(15)); b = (5*h + 32) >>> 6; c = (5*v + 32) >>> 6;
          s = (a + b*(x-7) + c*(y-7) + 16) >>> 5;
          return s < 0 ? 0 : (s > 255 ? 255 : s);
        end
      endcase
      default: case (mode)
        2: return pt(x);
        1: return pl(y);
        0: begin
          int xo, yo, st, sl;
          xo = (x/4)*4; yo = (y/4)*4;
          st = 0; sl = 0;
          for (int i = 0; i < 4; i++) begin st += pt(xo+i); sl += pl(yo+i); end
          if (xo == yo) begin
            if (avail_top && avail_left) return (st + sl + 4) >> 3;
            if (avail_top) return (st + 2) >> 2;
            if (avail_left) return (sl + 2) >> 2;
          end else if (xo > 0) begin
            if (avail_top) return (st + 2) >> 2;
            if (avail_left) return (sl + 2) >> 2;
          end else begin
            if (avail_left) return (sl + 2) >> 2;
            if (avail_top) return (st + 2) >> 2;
          end
          return 128;
        end
        default: begin
          h = 0; v = 0;
          for (int i = 0; i <= 3; i++) begin
            h += (i+1) * (pt(4+i) - pt(2-i));
            v += (i+1) * (pl(4+i) - pl(2-i));
          end
          a = 16 * (pl(7) + pt(7)); b = (34*h + 32) >>> 6; c = (34*v + 32) >>> 6;
          s = (a + b*(x-3) + c*(y-3) + 16) >>> 5;
          return s < 0 ? 0 : (s > 255 ? 255 : s);
        end
      endcase
    endcase
  endfunction

  task automatic run(input ip_blk_e b, input int m);
    int n_out, lat, exp_rows, exp_lat;
    bit seen;
    for (int i = 0; i < 16; i++) begin top[i] = pixel_t'($urandom); left[i] = pixel_t'($urandom); end
    ul = pixel_t'($urandom);
    // smooth ramps sometimes, so the plane mode is not always clipped
    if ($urandom_range(0, 1) == 1)
      for (int i = 0; i < 16; i++) begin
        top[i] = pixel_t'(100 + 3*i + $urandom_range(0, 3));
        left[i] = pixel_t'(90 + 2*i + $urandom_range(0, 3));
      end
    avail_tr = $urandom_range(0, 1);
    if ((b == IP_I4 && m == 2) || (b == IP_I16 && m == 2) || (b == IP_CHROMA && m == 0)) begin
      avail_top = $urandom_range(0, 1); avail_left = $urandom_range(0, 1);
    end else begin
      avail_top = 1; avail_left = 1;
    end
    @(negedge clk);
    blk = b; mode = 4'(m); start = 1;
    @(negedge clk); start = 0;
    n_out = 0; lat = 1; seen = 0;
    while (1) begin
      if (out_valid) begin
        seen = 1;
        for (int p = 0; p < 4; p++) begin
          int e;
          e = ref_pred(int'(out_xq)*4 + p, int'(out_y));
          checks++;
          if (int'(pred[p]) != e) begin
            failures++;
            $display("FAIL blk %0d mode %0d (%0d,%0d): got %0d exp %0d", b, m,
                     int'(out_xq)*4+p, out_y, pred[p], e);
          end
        end
        n_out++;
        if (done) break;
      end else if (!seen) lat++;
      @(negedge clk);
    end
    exp_rows = (b == IP_I4) ? 4 : (b == IP_I16 ? 64 : 16);
    exp_lat = (b == IP_I16 && m == 2) ? 3 :
              (((b == IP_I4 && m == 2) || (b == IP_CHROMA && m == 0) || (b != IP_I4 && m == 3)) ? 2 : 1);
    checks++;
    if (n_out != exp_rows || lat != exp_lat) begin
      failures++;
      $display("FAIL blk %0d mode %0d: %0d output cycles, latency %0d", b, m, n_out, lat);
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; blk = IP_I4; mode = 0; avail_top = 1; avail_left = 1; avail_tr = 1; ul = 0;
    for (int i = 0; i < 16; i++) begin top[i] = 0; left[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      for (int m = 0; m < 9; m++) run(IP_I4, m);
      for (int m = 0; m < 4; m++) run(IP_I16, m);
      for (int m = 0; m < 4; m++) run(IP_CHROMA, m);
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
