// ime_sw_loader: fills the search-window SRAM (ime_sw_mem) from the local bus, with
// on-chip padding at the frame edges.
//
// For the first macroblock of a row (mb_x == 0) it loads the whole window, 2*SRH+15
// columns by 2*SRV+15 rows. For every other macroblock the window moves 16 pixels right
// and only the 16 new columns are loaded; the remaining columns are reused in place by
// the circular column addressing of ime_sw_mem. Reference coordinates outside the frame
// are clamped to the nearest edge pixel before the bus request, which pads the frame
// without storing padded pixels externally. Loading only the new part of the window and
// padding on chip follow the document; the bus protocol and load order are this design's.
// Interface: start (one cycle) with mb_x, mb_y, frame_w, frame_h; the loader issues one
// pixel read per cycle while ext_ready is high (ext_req, ext_x, ext_y) and expects the
// pixel on ext_rdata exactly one cycle after each accepted request. done pulses one
// cycle after the last pixel is written; loaded counts pixels read since reset.
module ime_sw_loader
  import h264_pkg::*;
#(
  parameter int SRH = 64,
  parameter int SRV = 32,
  localparam int COLS = 2 * SRH + 16,
  localparam int ROWS = 2 * SRV + 15,
  localparam int CW   = $clog2(COLS),
  localparam int RW   = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [7:0]    mb_x,
  input  logic [7:0]    mb_y,
  input  logic [11:0]   frame_w,
  input  logic [11:0]   frame_h,
  output logic          busy,
  output logic          done,
  // local bus read port
  output logic          ext_req,
  output logic [11:0]   ext_x,
  output logic [11:0]   ext_y,
  input  logic          ext_ready,
  input  pixel_t        ext_rdata,
  // SRAM write port
  output logic          sw_we,
  output logic [RW-1:0] sw_row,
  output logic [CW-1:0] sw_col,
  output pixel_t        sw_wdata,
  output logic [31:0]   loaded
);

  logic signed [15:0] x_first, x_cur, y_cur;
  logic [7:0]         ncols, col_i;
  logic [RW-1:0]      row_i;
  logic               last_issued;
  logic               pend;
  logic [RW-1:0]      pend_row;
  logic [CW-1:0]      pend_col;

  function automatic logic [11:0] clampc(input logic signed [15:0] v, input logic [11:0] lim);
    if (v < 0) return '0;
    if (v >= $signed({4'd0, lim})) return lim - 12'd1;
    return v[11:0];
  endfunction

  function automatic logic [CW-1:0] physc(input logic signed [15:0] x);
    int v;
    v = (int'(x) + 4 * COLS) % COLS;
    return CW'(v);
  endfunction

  assign ext_req = busy && !last_issued;
  assign ext_x   = clampc(x_cur, frame_w);
  assign ext_y   = clampc(y_cur, frame_h);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; last_issued <= 1'b0;
      x_first <= '0; x_cur <= '0; y_cur <= '0; ncols <= '0; col_i <= '0; row_i <= '0;
      pend <= 1'b0; pend_row <= '0; pend_col <= '0;
      sw_we <= 1'b0; sw_row <= '0; sw_col <= '0; sw_wdata <= '0; loaded <= '0;
    end else begin
      done  <= 1'b0;
      sw_we <= 1'b0;
      // write back the pixel requested in the previous cycle
      if (pend) begin
        sw_we    <= 1'b1;
        sw_row   <= pend_row;
        sw_col   <= pend_col;
        sw_wdata <= ext_rdata;
        loaded   <= loaded + 32'd1;
      end
      pend <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        last_issued <= 1'b0;
        row_i       <= '0;
        col_i       <= '0;
        y_cur       <= $signed({4'd0, mb_y, 4'd0}) - 16'(SRV);
        if (mb_x == 8'd0) begin
          x_first <= -16'(SRH);
          x_cur   <= -16'(SRH);
          ncols   <= 8'(COLS - 1);
        end else begin
          x_first <= $signed({4'd0, mb_x, 4'd0}) + 16'(SRH - 1);
          x_cur   <= $signed({4'd0, mb_x, 4'd0}) + 16'(SRH - 1);
          ncols   <= 8'd16;
        end
      end else if (ext_req && ext_ready) begin
        pend     <= 1'b1;
        pend_row <= row_i;
        pend_col <= physc(x_cur);
        if (col_i == ncols - 8'd1) begin
          col_i <= '0;
          x_cur <= x_first;
          y_cur <= y_cur + 16'sd1;
          if (row_i == RW'(ROWS - 1)) last_issued <= 1'b1;
          else row_i <= row_i + 1'b1;
        end else begin
          col_i <= col_i + 8'd1;
          x_cur <= x_cur + 16'sd1;
        end
      end else if (busy && last_issued && !pend) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
