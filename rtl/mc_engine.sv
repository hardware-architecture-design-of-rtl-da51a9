// mc_engine: low-bandwidth luma motion compensation for one partition (4x4 up to 16x16)
// of a macroblock.
//
// A straightforward 4x4-based MC reads a 9x9 integer window for every 4x4 block. This
// engine uses the document's two bandwidth-reduction techniques:
//  - interpolation window reuse (IWR): the windows of the 4x4 blocks of one partition
//    overlap, so the union window of the partition is read once into a local window
//    buffer (in place of the document's down-shift register array and horizontal reuse
//    memory) and every 4x4 block takes its 9x9 window from it;
//  - interpolation window classification (IWC): the control FSM and address generator
//    size the window from the MV fraction. An XxY partition needs (X+5) columns only if
//    the horizontal fraction is non-zero, otherwise X, and likewise for rows; e.g. a 4x4
//    block with integer horizontal MV reads a 4x9 window.
// Reference coordinates outside the frame are clamped to the edge (H.264 padding). The
// 4x4 blocks then pass one per cycle through the 2-D interpolation unit (mc_ip_unit).
//
// Interface: pulse start with blk_x/blk_y (partition position in pixels), part_w4/part_h4
// (size in 4x4 blocks: 1, 2 or 4), mv in quarter pixels and the frame size, held until
// done. The engine reads one pixel per cycle while ext_ready is high (ext_req, ext_x,
// ext_y) and expects the pixel on ext_rdata one cycle after each accepted request. It then
// emits one 4x4 prediction per cycle on out_valid/out_bx/out_by/out_pred (blocks in raster
// order inside the partition); done pulses with the last one. fetched counts pixels read.
module mc_engine
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] blk_x,
  input  logic [11:0] blk_y,
  input  logic [2:0]  part_w4,
  input  logic [2:0]  part_h4,
  input  mv_t         mv,
  input  logic [11:0] frame_w,
  input  logic [11:0] frame_h,
  output logic        busy,
  // local bus read port
  output logic        ext_req,
  output logic [11:0] ext_x,
  output logic [11:0] ext_y,
  input  logic        ext_ready,
  input  pixel_t      ext_rdata,
  // compensated 4x4 blocks
  output logic        out_valid,
  output logic [1:0]  out_bx,
  output logic [1:0]  out_by,
  output pixel_t      out_pred [4][4],
  output logic        done,
  output logic [31:0] fetched
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_IP} state_e;
  state_e state;

  pixel_t wbuf [21][21];            // partition interpolation window
  logic [1:0]  fx, fy;
  logic signed [15:0] wx0, wy0;     // window origin in the frame
  logic [4:0]  ww, wh;              // window size (IWC)
  logic [4:0]  cx, cy;              // fetch counters
  logic [4:0]  ox, oy;              // buffer offset: 2 when that fraction is zero
  logic        last_issued, pend;
  logic [4:0]  pend_r, pend_c;
  logic [2:0]  pw, ph;
  logic [1:0]  bx, by;
  logic [1:0]  ip_bx, ip_by;
  pixel_t      win [9][9];

  function automatic logic [11:0] clampc(input logic signed [15:0] v, input logic [11:0] lim);
    if (v < 0) return '0;
    if (v >= $signed({4'd0, lim})) return lim - 12'd1;
    return v[11:0];
  endfunction

  // address generator
  assign ext_req = (state == S_FETCH) && !last_issued;
  assign ext_x   = clampc(wx0 + $signed({11'd0, cx}), frame_w);
  assign ext_y   = clampc(wy0 + $signed({11'd0, cy}), frame_h);
  assign busy    = (state != S_IDLE);

  // 9x9 window of the current 4x4 block
  always_comb begin
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        win[r][c] = wbuf[4*int'(by) + r][4*int'(bx) + c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; fx <= '0; fy <= '0; wx0 <= '0; wy0 <= '0; ww <= '0; wh <= '0;
      cx <= '0; cy <= '0; ox <= '0; oy <= '0; last_issued <= 1'b0; pend <= 1'b0;
      pend_r <= '0; pend_c <= '0; pw <= '0; ph <= '0; bx <= '0; by <= '0;
      ip_bx <= '0; ip_by <= '0; fetched <= '0;
      for (int r = 0; r < 21; r++)
        for (int c = 0; c < 21; c++) wbuf[r][c] <= '0;
    end else begin
      pend     <= 1'b0;
      if (pend) begin
        wbuf[pend_r][pend_c] <= ext_rdata;
        fetched <= fetched + 32'd1;
      end
      case (state)
        S_IDLE: if (start) begin
          // control FSM: classify the window from the MV fraction
          fx  <= mv.x[1:0];
          fy  <= mv.y[1:0];
          pw  <= part_w4; ph <= part_h4;
          wx0 <= $signed({4'd0, blk_x}) + (mv.x >>> 2) - ((mv.x[1:0] != 0) ? 16'sd2 : 16'sd0);
          wy0 <= $signed({4'd0, blk_y}) + (mv.y >>> 2) - ((mv.y[1:0] != 0) ? 16'sd2 : 16'sd0);
          ww  <= 5'(4 * int'(part_w4) + ((mv.x[1:0] != 0) ? 5 : 0));
          wh  <= 5'(4 * int'(part_h4) + ((mv.y[1:0] != 0) ? 5 : 0));
          ox  <= (mv.x[1:0] != 0) ? 5'd0 : 5'd2;
          oy  <= (mv.y[1:0] != 0) ? 5'd0 : 5'd2;
          cx  <= '0; cy <= '0; last_issued <= 1'b0;
          bx  <= '0; by <= '0;
          state <= S_FETCH;
        end
        S_FETCH: begin
          if (ext_req && ext_ready) begin
            pend   <= 1'b1;
            pend_r <= cy + oy;
            pend_c <= cx + ox;
            if (cx == ww - 5'd1) begin
              cx <= '0;
              if (cy == wh - 5'd1) last_issued <= 1'b1;
              else cy <= cy + 5'd1;
            end else cx <= cx + 5'd1;
          end else if (last_issued && !pend) begin
            state <= S_IP;
          end
        end
        S_IP: begin
          ip_bx <= bx; ip_by <= by;
          if (3'(bx) == pw - 3'd1) begin
            bx <= '0;
            if (3'(by) == ph - 3'd1) state <= S_IDLE;
            else by <= by + 2'd1;
          end else bx <= bx + 2'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic ip_out_valid;
  mc_ip_unit u_ip (
    .clk, .rst_n, .in_valid(state == S_IP), .win, .fx, .fy,
    .out_valid(ip_out_valid), .pred(out_pred)
  );

  assign out_valid = ip_out_valid;
  assign out_bx    = ip_bx;
  assign out_by    = ip_by;
  assign done      = ip_out_valid && (3'(ip_bx) == pw - 3'd1) && (3'(ip_by) == ph - 3'd1);

endmodule
