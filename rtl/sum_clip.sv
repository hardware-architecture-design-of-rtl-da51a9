// sum_clip: the decoder's sum-and-clipping engine. It adds a 4x4 block of predicted
// pixels (from intra or inter prediction) to the 4x4 residual block from the inverse
// transform and clips each sum to 0..255, giving the reconstructed block. One block per
// cycle; the result is registered (out_valid one cycle after in_valid). The document
// gives the function; the block-per-cycle width is this design's choice, matching the
// one-block-per-cycle inverse transform.
module sum_clip
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  pixel_t             pred [4][4],
  input  logic signed [15:0] res  [4][4],
  output logic               out_valid,
  output pixel_t             rec  [4][4]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) rec[r][c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            rec[r][c] <= clip8(int'(pred[r][c]) + int'(res[r][c]));
    end
  end

endmodule
