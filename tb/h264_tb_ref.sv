// h264_tb_ref: reference models shared by the testbenches. It holds one reference frame
// (up to 64x64 pixels) and computes H.264 quarter-pixel luma samples from it with the
// standard's equations, clamping coordinates at the frame edges.
package h264_tb_ref;
  import h264_pkg::*;

  int     rf_w = 64, rf_h = 64;
  pixel_t rf [64][64];

  function automatic int gi(input int x, input int y);
    int cx, cy;
    cx = x < 0 ? 0 : (x >= rf_w ? rf_w - 1 : x);
    cy = y < 0 ? 0 : (y >= rf_h ? rf_h - 1 : y);
    return int'(rf[cy][cx]);
  endfunction

  function automatic int clp(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int f6(input int a, input int b, input int c, input int d,
                            input int e, input int f);
    return a + f - 5 * (b + e) + 20 * (c + d);
  endfunction

  function automatic int hb1(input int x, input int y);   // unrounded b at (x+1/2, y)
    return f6(gi(x-2,y), gi(x-1,y), gi(x,y), gi(x+1,y), gi(x+2,y), gi(x+3,y));
  endfunction
  function automatic int hb(input int x, input int y);
    return clp((hb1(x, y) + 16) >>> 5);
  endfunction
  function automatic int vh(input int x, input int y);    // h at (x, y+1/2)
    return clp((f6(gi(x,y-2), gi(x,y-1), gi(x,y), gi(x,y+1), gi(x,y+2), gi(x,y+3)) + 16) >>> 5);
  endfunction
  function automatic int cj(input int x, input int y);    // j at (x+1/2, y+1/2)
    return clp((f6(hb1(x,y-2), hb1(x,y-1), hb1(x,y), hb1(x,y+1), hb1(x,y+2), hb1(x,y+3)) + 512) >>> 10);
  endfunction

  // luma sample at quarter-pixel position (qx, qy), both in quarter pixels
  function automatic int qsample(input int qx, input int qy);
    int x, y, fx, fy, s1, s2;
    x = qx >>> 2; y = qy >>> 2; fx = qx & 3; fy = qy & 3;
    if (fx == 0 && fy == 0) return gi(x, y);
    if (fy == 0) begin
      if (fx == 2) return hb(x, y);
      return (hb(x, y) + gi(x + (fx == 3 ? 1 : 0), y) + 1) >> 1;
    end
    if (fx == 0) begin
      if (fy == 2) return vh(x, y);
      return (vh(x, y) + gi(x, y + (fy == 3 ? 1 : 0)) + 1) >> 1;
    end
    if (fx == 2 && fy == 2) return cj(x, y);
    if (fx == 2) return (cj(x, y) + hb(x, y + (fy == 3 ? 1 : 0)) + 1) >> 1;
    if (fy == 2) return (cj(x, y) + vh(x + (fx == 3 ? 1 : 0), y) + 1) >> 1;
    // diagonal quarter positions: average of the nearest b and h samples
    s1 = hb(x, y + (fy == 3 ? 1 : 0));
    s2 = vh(x + (fx == 3 ? 1 : 0), y);
    return (s1 + s2 + 1) >> 1;
  endfunction

  // ---------------- integer ME reference: best 16x16 cost and MV by full search, in the
  // scan order of the hardware, with 5-bit truncation and checkerboard sub-sampling.
  pixel_t cf [64][64];   // current frame

  function automatic int selen(input int v);
    int k;
    k = (v > 0) ? 2*v - 1 : -2*v;
    return 2 * ($clog2(k + 2) - 1) + 1;
  endfunction

  function automatic void ime16(input int mbx, input int mby, input int srh, input int srv,
                                input int lam, input int mvpx, input int mvpy,
                                output int best, output int bx, output int by);
    best = 32'h7fffffff; bx = 0; by = 0;
    for (int g = 0; g < 2*srh/8; g++)
      for (int dy = srv-1; dy >= -srv; dy--)
        for (int k = 0; k < 8; k++) begin
          int dx, s;
          dx = -srh + g*8 + k;
          s = lam * (selen(4*dx - mvpx) + selen(4*dy - mvpy));
          for (int y = 0; y < 16; y++)
            for (int x = 0; x < 16; x++)
              if (((x + y) & 1) == 0) begin
                int a, r;
                a = int'(cf[mby*16 + y][mbx*16 + x]) >> 3;
                r = gi(mbx*16 + x + dx, mby*16 + y + dy) >> 3;
                s += (a > r) ? a - r : r - a;
              end
          if (s < best) begin best = s; bx = dx; by = dy; end
        end
  endfunction

  // ---------------- 4x4 intra prediction reference (H.264 equations).
  // t[0..7] = p[0..7,-1], l[0..3] = p[-1,0..3], m = p[-1,-1]
  function automatic int i4pred(input int mode, input int x, input int y, input int t[8],
                                input int l[4], input int m, input bit at, input bit al);
    int s, z;
    int T[9], Lf[5];   // T[i+1] = p[i,-1], Lf[j+1] = p[-1,j], index 0 = corner
    T[0] = m; Lf[0] = m;
    for (int i = 0; i < 8; i++) T[i+1] = t[i];
    for (int j = 0; j < 4; j++) Lf[j+1] = l[j];
    case (mode)
      0: return T[x+1];
      1: return Lf[y+1];
      2: begin
        s = 0; for (int i = 0; i < 4; i++) s += (at ? T[i+1] : 0) + (al ? Lf[i+1] : 0);
        if (at && al) return (s + 4) >> 3;
        if (at || al) return (s + 2) >> 2;
        return 128;
      end
      3: if (x == 3 && y == 3) return (T[7] + 3*T[8] + 2) >> 2;
         else return (T[x+y+1] + 2*T[x+y+2] + T[x+y+3] + 2) >> 2;
      4: if (x > y) return (T[x-y-1] + 2*T[x-y] + T[x-y+1] + 2) >> 2;
         else if (x < y) return (Lf[y-x-1] + 2*Lf[y-x] + Lf[y-x+1] + 2) >> 2;
         else return (T[1] + 2*m + Lf[1] + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return (T[x-(y>>1)] + T[x-(y>>1)+1] + 1) >> 1;
        if (z > 0) return (T[x-(y>>1)-1] + 2*T[x-(y>>1)] + T[x-(y>>1)+1] + 2) >> 2;
        if (z == -1) return (Lf[1] + 2*m + T[1] + 2) >> 2;
        return (Lf[y] + 2*Lf[y-1] + Lf[y-2] + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return (Lf[y-(x>>1)] + Lf[y-(x>>1)+1] + 1) >> 1;
        if (z > 0) return (Lf[y-(x>>1)-1] + 2*Lf[y-(x>>1)] + Lf[y-(x>>1)+1] + 2) >> 2;
        if (z == -1) return (Lf[1] + 2*m + T[1] + 2) >> 2;
        return (T[x] + 2*T[x-1] + T[x-2] + 2) >> 2;
      end
      7: if (y % 2 == 0) return (T[x+(y>>1)+1] + T[x+(y>>1)+2] + 1) >> 1;
         else return (T[x+(y>>1)+1] + 2*T[x+(y>>1)+2] + T[x+(y>>1)+3] + 2) >> 2;
      default: begin
        z = x + 2*y;
        if (z > 5) return Lf[4];
        if (z == 5) return (Lf[3] + 3*Lf[4] + 2) >> 2;
        if (z % 2 == 0) return (Lf[y+(x>>1)+1] + Lf[y+(x>>1)+2] + 1) >> 1;
        return (Lf[y+(x>>1)+1] + 2*Lf[y+(x>>1)+2] + Lf[y+(x>>1)+3] + 2) >> 2;
      end
    endcase
  endfunction

  // ---------------- inverse quantisation and transform reference
  function automatic void iqit(input int lev[16], input int qp, output int r[4][4]);
    int scan[16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
    int vt[6][3] = '{'{10, 13, 16}, '{11, 14, 18}, '{13, 16, 20}, '{14, 18, 23}, '{16, 20, 25}, '{18, 23, 29}};
    int d[4][4], h[4][4];
    for (int i = 0; i < 16; i++) begin
      int rr, cc, k;
      rr = scan[i] >> 2; cc = scan[i] & 3;
      k = (rr % 2 == 0 && cc % 2 == 0) ? 0 : ((rr % 2 == 1 && cc % 2 == 1) ? 1 : 2);
      d[rr][cc] = lev[i] * vt[qp % 6][k] * (1 << (qp / 6));
    end
    for (int i = 0; i < 4; i++) begin
      h[i][0] = d[i][0] + d[i][2] + d[i][1] + (d[i][3] >>> 1);
      h[i][1] = d[i][0] - d[i][2] + (d[i][1] >>> 1) - d[i][3];
      h[i][2] = d[i][0] - d[i][2] - (d[i][1] >>> 1) + d[i][3];
      h[i][3] = d[i][0] + d[i][2] - d[i][1] - (d[i][3] >>> 1);
    end
    for (int i = 0; i < 4; i++) begin
      r[0][i] = (h[0][i] + h[2][i] + h[1][i] + (h[3][i] >>> 1) + 32) >>> 6;
      r[1][i] = (h[0][i] - h[2][i] + (h[1][i] >>> 1) - h[3][i] + 32) >>> 6;
      r[2][i] = (h[0][i] - h[2][i] - (h[1][i] >>> 1) + h[3][i] + 32) >>> 6;
      r[3][i] = (h[0][i] + h[2][i] - h[1][i] - (h[3][i] >>> 1) + 32) >>> 6;
    end
  endfunction
endpackage
