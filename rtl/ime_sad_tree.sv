// ime_sad_tree: one PE array with its 2-D SAD tree, computing all 41 variable-block-size
// SADs of one search candidate every cycle.
//
// A PE takes the absolute difference of a current-MB pixel and a reference pixel. The 256
// PEs (128 when sub-sampling) feed sixteen 2-D adder sub-trees, one per 4x4 block, and one
// VBS tree then adds the sixteen 4x4 SADs into the 8x4, 4x8, 8x8, 16x8, 8x16 and 16x16
// SADs, so larger blocks reuse the 4x4 sums and no partial SAD is stored between cycles.
// Pixels are truncated to PIX_BITS most significant bits before the difference, and with
// SUBSAMPLE set only the pixels where (x + y) is even are used, halving the PE count.
// Both follow the document; the checkerboard pattern of the sub-sampling is this design's
// choice. Interface: cur and ref_blk are 16x16 pixel arrays indexed [y][x]; sad is the
// 41-entry array in h264_pkg order, registered: it appears one cycle after its inputs,
// with in_valid delayed to out_valid alongside it.
module ime_sad_tree
  import h264_pkg::*;
#(
  parameter int PIX_BITS  = 5,
  parameter bit SUBSAMPLE = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pixel_t               cur     [16][16],
  input  pixel_t               ref_blk [16][16],
  output logic                 out_valid,
  output logic [SAD_W-1:0]     sad     [NUM_VBS]
);

  localparam int SH = 8 - PIX_BITS;

  logic [SAD_W-1:0] s4  [16];   // 4x4 SADs from the 2-D sub-trees
  logic [SAD_W-1:0] sad_c [NUM_VBS];

  // PE array and sixteen 2-D adder sub-trees.
  always_comb begin
    for (int by = 0; by < 4; by++) begin
      for (int bx = 0; bx < 4; bx++) begin
        logic [SAD_W-1:0] acc;
        acc = '0;
        for (int yy = 0; yy < 4; yy++) begin
          for (int xx = 0; xx < 4; xx++) begin
            logic [7:0] a, b, d;
            a = cur[by*4+yy][bx*4+xx] >> SH;
            b = ref_blk[by*4+yy][bx*4+xx] >> SH;
            d = (a > b) ? a - b : b - a;
            if (!SUBSAMPLE || (((xx + yy) & 1) == 0))
              acc = acc + SAD_W'(d);
          end
        end
        s4[by*4+bx] = acc;
      end
    end
  end

  // VBS tree.
  always_comb begin
    for (int i = 0; i < 16; i++) sad_c[VBS_4X4 + i] = s4[i];
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 2; bx++)
        sad_c[VBS_8X4 + by*2 + bx] = s4[by*4 + bx*2] + s4[by*4 + bx*2 + 1];
    for (int by = 0; by < 2; by++)
      for (int bx = 0; bx < 4; bx++)
        sad_c[VBS_4X8 + by*4 + bx] = s4[by*8 + bx] + s4[by*8 + 4 + bx];
    for (int by = 0; by < 2; by++)
      for (int bx = 0; bx < 2; bx++)
        sad_c[VBS_8X8 + by*2 + bx] = sad_c[VBS_8X4 + by*4 + bx] + sad_c[VBS_8X4 + by*4 + 2 + bx];
    for (int by = 0; by < 2; by++)
      sad_c[VBS_16X8 + by] = sad_c[VBS_8X8 + by*2] + sad_c[VBS_8X8 + by*2 + 1];
    for (int bx = 0; bx < 2; bx++)
      sad_c[VBS_8X16 + bx] = sad_c[VBS_8X8 + bx] + sad_c[VBS_8X8 + 2 + bx];
    sad_c[VBS_16X16] = sad_c[VBS_16X8] + sad_c[VBS_16X8 + 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < NUM_VBS; i++) sad[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sad <= sad_c;
    end
  end

endmodule
