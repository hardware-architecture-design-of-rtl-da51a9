// mc_ip_unit: 2-D interpolation unit of the motion compensation engine. It produces the
// quarter-pixel luma prediction of one 4x4 block from a 9x9 window of integer reference
// pixels.
//
// The horizontal IP part applies the 6-tap filter (1,-5,20,20,-5,1) along rows to give
// the horizontal half-pixel samples (b), the vertical part applies it down columns (h)
// and, on the unrounded horizontal results, gives the centre half-pixel samples (j).
// The average-or-bypass stage then either passes an integer or half-pixel sample or
// averages two neighbouring samples with rounding for the quarter positions, as the
// H.264 standard defines. The split into horizontal IP, vertical IP and average/bypass
// follows the document's block diagram; it computes all 16 pixels of the block in one
// pass instead of row by row through a down-shift register array, which is this
// design's simplification. Interface: win[r][c] is the reference pixel at (c-2, r-2)
// relative to the block's top-left integer position; fx, fy are the quarter-pixel
// fractions of the MV. pred is registered: out_valid follows in_valid by one cycle.
// With a fraction of 0 in one direction, the window pixels outside the block in that
// direction are not used, so a smaller window (interpolation window classification)
// may leave them at any value.
module mc_ip_unit
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pixel_t     win [9][9],
  input  logic [1:0] fx,
  input  logic [1:0] fy,
  output logic       out_valid,
  output pixel_t     pred [4][4]
);

  function automatic int tap6(input int e, input int f, input int g, input int h,
                              input int i, input int j);
    return e - 5*f + 20*g + 20*h - 5*i + j;
  endfunction

  // integer pixel at block coordinates (x, y), -2 <= x, y <= 6
  function automatic int G(input int x, input int y);
    return int'(win[y+2][x+2]);
  endfunction
  // unrounded horizontal half sample between (x, y) and (x+1, y)
  function automatic int b1(input int x, input int y);
    return tap6(G(x-2,y), G(x-1,y), G(x,y), G(x+1,y), G(x+2,y), G(x+3,y));
  endfunction
  // unrounded vertical half sample between (x, y) and (x, y+1)
  function automatic int h1(input int x, input int y);
    return tap6(G(x,y-2), G(x,y-1), G(x,y), G(x,y+1), G(x,y+2), G(x,y+3));
  endfunction
  function automatic int bh(input int x, input int y);
    return int'(clip8((b1(x, y) + 16) >>> 5));
  endfunction
  function automatic int hh(input int x, input int y);
    return int'(clip8((h1(x, y) + 16) >>> 5));
  endfunction
  function automatic int jh(input int x, input int y);
    int j1;
    j1 = tap6(b1(x,y-2), b1(x,y-1), b1(x,y), b1(x,y+1), b1(x,y+2), b1(x,y+3));
    return int'(clip8((j1 + 512) >>> 10));
  endfunction

  function automatic pixel_t qpel(input int x, input int y, input logic [1:0] qx, input logic [1:0] qy);
    int v;
    case ({qx, qy})
      4'b00_00: v = G(x, y);
      4'b01_00: v = (G(x, y) + bh(x, y) + 1) >> 1;            // a
      4'b10_00: v = bh(x, y);                                  // b
      4'b11_00: v = (G(x+1, y) + bh(x, y) + 1) >> 1;          // c
      4'b00_01: v = (G(x, y) + hh(x, y) + 1) >> 1;            // d
      4'b00_10: v = hh(x, y);                                  // h
      4'b00_11: v = (G(x, y+1) + hh(x, y) + 1) >> 1;          // n
      4'b10_10: v = jh(x, y);                                  // j
      4'b10_01: v = (bh(x, y) + jh(x, y) + 1) >> 1;           // f
      4'b10_11: v = (jh(x, y) + bh(x, y+1) + 1) >> 1;         // q
      4'b01_10: v = (hh(x, y) + jh(x, y) + 1) >> 1;           // i
      4'b11_10: v = (jh(x, y) + hh(x+1, y) + 1) >> 1;         // k
      4'b01_01: v = (bh(x, y) + hh(x, y) + 1) >> 1;           // e
      4'b11_01: v = (bh(x, y) + hh(x+1, y) + 1) >> 1;         // g
      4'b01_11: v = (hh(x, y) + bh(x, y+1) + 1) >> 1;         // p
      default:  v = (hh(x+1, y) + bh(x, y+1) + 1) >> 1;       // r
    endcase
    return pixel_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) pred[y][x] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) pred[y][x] <= qpel(x, y, fx, fy);
    end
  end

endmodule
