// ime_ref_array: the reference pixel register array between the search-window SRAM and
// the eight PE arrays of the integer motion estimator.
//
// It holds 16 rows of NCAND+15 reference pixels (23 for eight candidates). Each shift
// pushes the row read from the SRAM in at the top and moves every stored row one place
// down, so the array always holds the 16 rows starting at the newest one. Candidate k
// (k = 0..NCAND-1) sees the 16x16 window that starts at column k, so eight horizontally
// adjacent candidates share 16+7 columns instead of 8x16 (inter-candidate data reuse),
// and moving to the next vertical position costs one new row. Row-serial loading from
// the top follows the document's figure of the array; the width NCAND+15 follows its
// count of 256+16x7 pixels for eight candidates. Interface: shift with row_in loads one
// row at the clock edge; cand[k] is combinational from the registers.
module ime_ref_array
  import h264_pkg::*;
#(
  parameter int NCAND = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   shift,
  input  pixel_t row_in [NCAND+15],
  output pixel_t cand   [NCAND][16][16]
);

  localparam int W = NCAND + 15;

  pixel_t rows [16][W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < W; c++) rows[r][c] <= '0;
    end else if (shift) begin
      rows[0] <= row_in;
      for (int r = 1; r < 16; r++) rows[r] <= rows[r-1];
    end
  end

  always_comb begin
    for (int k = 0; k < NCAND; k++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          cand[k][r][c] = rows[r][k + c];
  end

endmodule
