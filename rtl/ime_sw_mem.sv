// ime_sw_mem: the luma reference-pixel SRAM that holds the search window of the integer
// motion estimator.
//
// It stores 2*SRV+15 rows by 2*SRH+16 columns of pixels: all reference pixels that the
// candidates MV in [-SRH, SRH-1] x [-SRV, SRV-1] of one 16x16 macroblock can touch, plus
// one spare column. Columns are addressed circularly (frame x modulo the width), so when
// the search moves one macroblock to the right only the 16 new columns are written and
// the rest of the window is reused (macroblock-level data reuse). One write port takes
// one pixel per cycle from the loader; one read port returns RD_W consecutive pixels of
// a row, starting at any column and wrapping around, one cycle after the request
// (synchronous read). The defaults are the document's largest search range, H[-64,+63]
// and V[-32,+31]; the circular column scheme is this design's way of realising the reuse.
module ime_sw_mem
  import h264_pkg::*;
#(
  parameter int SRH  = 64,
  parameter int SRV  = 32,
  parameter int RD_W = 23,
  localparam int COLS = 2 * SRH + 16,
  localparam int ROWS = 2 * SRV + 15,
  localparam int CW   = $clog2(COLS),
  localparam int RW   = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RW-1:0] wrow,
  input  logic [CW-1:0] wcol,
  input  pixel_t        wdata,
  input  logic          re,
  input  logic [RW-1:0] rrow,
  input  logic [CW-1:0] rcol,
  output pixel_t        rdata [RD_W]
);

  pixel_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wcol] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      for (int i = 0; i < RD_W; i++) begin
        int c;
        c = int'(rcol) + i;
        if (c >= COLS) c = c - COLS;
        rdata[i] <= mem[rrow][c];
      end
    end
  end

endmodule
