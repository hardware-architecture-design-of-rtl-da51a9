// h264_pkg: types and constants shared by the encoder and decoder blocks.
// Pixels are 8-bit luma/chroma samples. Motion vectors are signed 16-bit pairs; the
// integer motion estimation side counts them in whole pixels, the motion compensation
// side in quarter pixels, as noted at each port. The 41 variable-block-size (VBS)
// partitions of a macroblock are numbered as listed at VBS_* below; every block that
// carries "41 SADs" or "41 MVs" uses that order.
package h264_pkg;

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    logic signed [15:0] x;
    logic signed [15:0] y;
  } mv_t;

  // Number of VBS partitions in a 16x16 macroblock: 16 4x4, 8 8x4, 8 4x8, 4 8x8,
  // 2 16x8, 2 8x16 and one 16x16.
  localparam int NUM_VBS   = 41;
  localparam int SAD_W     = 16;   // wide enough for a 16x16 SAD of 8-bit pixels
  localparam int COST_W    = 20;   // SAD plus motion-vector rate cost

  // Index of the first partition of each size; inside a size, blocks run in raster order.
  localparam int VBS_4X4   = 0;    // 16 blocks, index 0 + by*4 + bx
  localparam int VBS_8X4   = 16;   // 8 blocks (8 wide, 4 tall), index 16 + by*2 + bx
  localparam int VBS_4X8   = 24;   // 8 blocks (4 wide, 8 tall), index 24 + by*4 + bx
  localparam int VBS_8X8   = 32;   // 4 blocks, index 32 + by*2 + bx
  localparam int VBS_16X8  = 36;   // 2 blocks (16 wide, 8 tall), index 36 + by
  localparam int VBS_8X16  = 38;   // 2 blocks (8 wide, 16 tall), index 38 + bx
  localparam int VBS_16X16 = 40;

  // Intra prediction block types and mode numbers (H.264 numbering).
  typedef enum logic [1:0] {
    IP_I4    = 2'd0,   // 4x4 luma block, modes 0..8
    IP_I16   = 2'd1,   // 16x16 luma, modes 0 V, 1 H, 2 DC, 3 plane
    IP_CHROMA= 2'd2    // 8x8 chroma, modes 0 DC, 1 H, 2 V, 3 plane
  } ip_blk_e;

  function automatic pixel_t clip8(input int v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return pixel_t'(v);
  endfunction

  // Length in bits of the signed Exp-Golomb code se(v).
  function automatic int se_len(input int v);
    int k, n;
    k = (v > 0) ? 2 * v - 1 : -2 * v;
    n = 0;
    for (int i = 0; i < 31; i++)
      if (((k + 1) >> (i + 1)) != 0) n = i + 1;
    return 2 * n + 1;
  endfunction

endpackage
