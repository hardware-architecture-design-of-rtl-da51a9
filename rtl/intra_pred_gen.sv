// intra_pred_gen: four-parallel reconfigurable intra predictor generator for H.264 luma
// 4x4 (I4MB, 9 modes), luma 16x16 (I16MB, 4 modes) and 8x8 chroma (4 modes).
//
// Four processing elements (PEs) each produce one predicted pixel per cycle, so a row of
// four pixels leaves the block every cycle. A PE is a multiplexer choosing four operands
// from the neighbouring pixels, two adders and a third adder, a D register, a round-and-
// shift stage, a clip stage and an output multiplexer. Four configurations share them:
//  - bypass: I4/I16 vertical and horizontal, chroma H/V; the selected boundary pixel is
//    the predictor;
//  - accumulation/cascade: DC modes; the PEs sum four boundary pixels each into D0..D3
//    (one cycle for I4 and chroma, two for I16) and the cascaded sum gives the DC value;
//  - normal: I4 directional modes 3..8; each PE picks its operands with repetition
//    according to the filter weights, so every such pixel is (o0+o1+o2+o3+2)>>2 (a
//    two-tap average is a pair picked twice each);
//  - recursive: I16 and chroma plane; D0..D3 hold the unscaled plane values of the four
//    current pixels and the gradient b (along a row) or c (to the next row) is added
//    each cycle instead of multiplying.
// The PE structure and the four configurations follow the document's figure. The
// plane parameters a, b and c are computed in one set-up cycle with constant
// multipliers, the output order (raster rows of four pixels) and the handshake are this
// design's choices. Predictor values follow the H.264 standard equations.
//
// Interface: pulse start with blk, mode and the neighbours held until done. For I4,
// top[0..7] are A..H, left[0..3] are I..L and ul is M; E..H are replaced by D when
// avail_tr is low. For I16, top/left are U0..U15/L0..L15 and ul is UL; for chroma the
// first eight of each are used. Each output cycle gives out_valid, the row out_y, the
// group of four columns out_xq and pred[0..3] (columns 4*out_xq..4*out_xq+3). done
// pulses with the last row. Latency from start to first row: 1 cycle (bypass, normal),
// 2 (I4/chroma DC, plane), 3 (I16 DC). Rows: 4 for I4, 16x4 groups for I16, 8x2 groups
// for chroma.
module intra_pred_gen
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ip_blk_e    blk,
  input  logic [3:0] mode,
  input  logic       avail_top,
  input  logic       avail_left,
  input  logic       avail_tr,
  input  pixel_t     top  [16],
  input  pixel_t     left [16],
  input  pixel_t     ul,
  output logic       busy,
  output logic       out_valid,
  output logic [3:0] out_y,
  output logic [1:0] out_xq,
  output pixel_t     pred [4],
  output logic       done
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_PLANE, S_OUT} state_e;
  typedef enum logic [1:0] {C_BYPASS, C_ACC, C_NORMAL, C_RECUR} cfg_e;

  state_e           state;
  cfg_e             cfg;
  ip_blk_e          blk_q;
  logic [3:0]       mode_q;
  logic             acc_cnt;
  logic [3:0]       y_q;
  logic [1:0]       xq_q;
  logic signed [19:0] d_reg [4];       // PE D registers
  logic signed [19:0] pb, pc, row_base; // plane gradients and value at the row start

  // I4 edge vector: E[0..3] = L,K,J,I; E[4] = M; E[5..12] = A..H
  pixel_t e [13];
  always_comb begin
    for (int j = 0; j < 4; j++) e[3-j] = left[j];
    e[4] = ul;
    for (int i = 0; i < 8; i++)
      e[5+i] = (i >= 4 && !avail_tr) ? top[3] : top[i];
  end

  // Operand indices into e[] for the normal configuration (I4 modes 3..8).
  function automatic logic [15:0] i4_ops(input logic [3:0] m, input int x, input int y);
    int o0, o1, o2, o3, z, k;
    // top(i) = 5+i, left(j) = 3-j
    o0 = 4; o1 = 4; o2 = 4; o3 = 4;
    case (m)
      4'd3: if (x == 3 && y == 3) begin o0 = 11; o1 = 12; o2 = 12; o3 = 12; end
            else begin o0 = 5+x+y; o1 = 6+x+y; o2 = 6+x+y; o3 = 7+x+y; end
      4'd4: begin k = x - y; o0 = 3+k; o1 = 4+k; o2 = 4+k; o3 = 5+k; end
      4'd5: begin
        z = 2*x - y; k = x - (y >> 1);
        if (z >= 0 && (z & 1) == 0) begin o0 = 4+k; o1 = 4+k; o2 = 5+k; o3 = 5+k; end
        else if (z > 0)             begin o0 = 3+k; o1 = 4+k; o2 = 4+k; o3 = 5+k; end
        else if (z == -1)           begin o0 = 3;   o1 = 4;   o2 = 4;   o3 = 5;   end
        else begin o0 = 3-(y-1); o1 = 3-(y-2); o2 = 3-(y-2); o3 = 3-(y-3); end
      end
      4'd6: begin
        z = 2*y - x; k = y - (x >> 1);
        if (z >= 0 && (z & 1) == 0) begin o0 = 4-k; o1 = 4-k; o2 = 3-k; o3 = 3-k; end
        else if (z > 0)             begin o0 = 5-k; o1 = 4-k; o2 = 4-k; o3 = 3-k; end
        else if (z == -1)           begin o0 = 3;   o1 = 4;   o2 = 4;   o3 = 5;   end
        else begin o0 = 5+x-1; o1 = 5+x-2; o2 = 5+x-2; o3 = 5+x-3; end
      end
      4'd7: begin
        k = x + (y >> 1);
        if ((y & 1) == 0) begin o0 = 5+k; o1 = 5+k; o2 = 6+k; o3 = 6+k; end
        else              begin o0 = 5+k; o1 = 6+k; o2 = 6+k; o3 = 7+k; end
      end
      default: begin // 8: horizontal-up
        z = x + 2*y; k = y + (x >> 1);
        if (z > 5)                     begin o0 = 0; o1 = 0; o2 = 0; o3 = 0; end
        else if (z == 5)               begin o0 = 1; o1 = 0; o2 = 0; o3 = 0; end
        else if ((z & 1) == 0)         begin o0 = 3-k; o1 = 3-k; o2 = 2-k; o3 = 2-k; end
        else                           begin o0 = 3-k; o1 = 2-k; o2 = 2-k; o3 = 1-k; end
      end
    endcase
    return {4'(o0), 4'(o1), 4'(o2), 4'(o3)};
  endfunction

  // DC value from the D registers (cascade of the four PEs' sums)
  function automatic pixel_t dc4(input int st, input int sl, input bit at, input bit al,
                                 input bit prefer_left, input bit both_ok);
    if (both_ok && at && al) return pixel_t'((st + sl + 4) >> 3);
    if (prefer_left) begin
      if (al) return pixel_t'((sl + 2) >> 2);
      if (at) return pixel_t'((st + 2) >> 2);
    end else begin
      if (at) return pixel_t'((st + 2) >> 2);
      if (al) return pixel_t'((sl + 2) >> 2);
    end
    return 8'd128;
  endfunction

  pixel_t dc_val;
  always_comb begin
    int s16, st, sl;
    logic xo, yo;
    s16 = int'(d_reg[0]) + int'(d_reg[1]) + int'(d_reg[2]) + int'(d_reg[3]);
    // chroma: block (xq, y>=4) uses D0/D1 (top halves) and D2/D3 (left halves)
    xo = xq_q[0]; yo = y_q[2];
    st = xo ? int'(d_reg[1]) : int'(d_reg[0]);
    sl = yo ? int'(d_reg[3]) : int'(d_reg[2]);
    dc_val = 8'd128;
    if (blk_q == IP_I4) begin
      dc_val = dc4(int'(d_reg[0]), int'(d_reg[1]), avail_top, avail_left, 1'b0, 1'b1);
    end else if (blk_q == IP_I16) begin
      // d_reg holds top-quad + left-quad sums; totals kept apart in row_base/pb
      if (avail_top && avail_left) dc_val = pixel_t'((s16 + 16) >> 5);
      else if (avail_top)          dc_val = pixel_t'((int'(pb) + 8) >> 4);
      else if (avail_left)         dc_val = pixel_t'((int'(pc) + 8) >> 4);
    end else begin
      if (xo == yo)     dc_val = dc4(st, sl, avail_top, avail_left, 1'b0, 1'b1);
      else if (xo)      dc_val = dc4(st, sl, avail_top, avail_left, 1'b0, 1'b0);
      else              dc_val = dc4(st, sl, avail_top, avail_left, 1'b1, 1'b0);
    end
  end

  // The four PEs in the current configuration.
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      int x, y, sum;
      logic [15:0] ops;
      pixel_t o [4];
      x = int'(xq_q) * 4 + p;
      y = int'(y_q);
      ops = i4_ops(mode_q, p, y);
      // operand multiplexer
      for (int i = 0; i < 4; i++) o[i] = e[ops[15-4*i -: 4]];
      sum = (int'(o[0]) + int'(o[1])) + (int'(o[2]) + int'(o[3]));
      case (cfg)
        C_BYPASS: begin
          // vertical: column pixel of the top row; horizontal: row pixel of the left column
          if ((blk_q == IP_CHROMA) ? (mode_q == 4'd2) : (mode_q == 4'd0)) pred[p] = top[x];
          else                                                           pred[p] = left[y];
        end
        C_ACC:    pred[p] = dc_val;
        C_NORMAL: pred[p] = pixel_t'((sum + 2) >> 2);
        default:  pred[p] = clip8(int'(d_reg[p] >>> 5));
      endcase
    end
  end

  // Plane parameters (set-up cycle).
  logic signed [19:0] pa_c, pb_c, pc_c;
  always_comb begin
    int h, v;
    h = 0; v = 0;
    if (blk_q == IP_I16) begin
      for (int i = 0; i < 8; i++) begin
        h += (i + 1) * (int'(top[8+i]) - int'((i == 7) ? ul : top[6-i]));
        v += (i + 1) * (int'(left[8+i]) - int'((i == 7) ? ul : left[6-i]));
      end
      pa_c = 20'(16 * (int'(left[15]) + int'(top[15])));
      pb_c = 20'((5 * h + 32) >>> 6);
      pc_c = 20'((5 * v + 32) >>> 6);
    end else begin
      for (int i = 0; i < 4; i++) begin
        h += (i + 1) * (int'(top[4+i]) - int'((i == 3) ? ul : top[2-i]));
        v += (i + 1) * (int'(left[4+i]) - int'((i == 3) ? ul : left[2-i]));
      end
      pa_c = 20'(16 * (int'(left[7]) + int'(top[7])));
      pb_c = 20'((34 * h + 32) >>> 6);
      pc_c = 20'((34 * v + 32) >>> 6);
    end
  end

  logic last_out;
  always_comb begin
    case (blk_q)
      IP_I4:   last_out = (y_q == 4'd3);
      IP_I16:  last_out = (y_q == 4'd15) && (xq_q == 2'd3);
      default: last_out = (y_q == 4'd7)  && (xq_q == 2'd1);
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_y     = y_q;
  assign out_xq    = xq_q;
  assign done      = (state == S_OUT) && last_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cfg <= C_BYPASS; blk_q <= IP_I4; mode_q <= '0; acc_cnt <= 1'b0;
      y_q <= '0; xq_q <= '0; pb <= '0; pc <= '0; row_base <= '0;
      for (int p = 0; p < 4; p++) d_reg[p] <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          blk_q <= blk; mode_q <= mode; y_q <= '0; xq_q <= '0; acc_cnt <= 1'b0;
          if (blk == IP_I4) begin
            if (mode == 4'd0 || mode == 4'd1) begin cfg <= C_BYPASS; state <= S_OUT; end
            else if (mode == 4'd2)             begin cfg <= C_ACC;    state <= S_ACC; end
            else                               begin cfg <= C_NORMAL; state <= S_OUT; end
          end else if (mode == 4'd3)           begin cfg <= C_RECUR;  state <= S_PLANE; end
          else if ((blk == IP_I16) ? (mode == 4'd2) : (mode == 4'd0))
                                               begin cfg <= C_ACC;    state <= S_ACC; end
          else                                 begin cfg <= C_BYPASS; state <= S_OUT; end
        end
        S_ACC: begin
          // accumulation configuration: each PE adds four boundary pixels
          if (blk_q == IP_I4) begin
            d_reg[0] <= 20'(int'(top[0]) + int'(top[1]) + int'(top[2]) + int'(top[3]));
            d_reg[1] <= 20'(int'(left[0]) + int'(left[1]) + int'(left[2]) + int'(left[3]));
            state <= S_OUT;
          end else if (blk_q == IP_CHROMA) begin
            for (int p = 0; p < 2; p++) begin
              d_reg[p]   <= 20'(int'(top[4*p]) + int'(top[4*p+1]) + int'(top[4*p+2]) + int'(top[4*p+3]));
              d_reg[p+2] <= 20'(int'(left[4*p]) + int'(left[4*p+1]) + int'(left[4*p+2]) + int'(left[4*p+3]));
            end
            state <= S_OUT;
          end else if (!acc_cnt) begin
            // first cycle: top quads
            int s;
            s = 0;
            for (int p = 0; p < 4; p++) begin
              d_reg[p] <= 20'(int'(top[4*p]) + int'(top[4*p+1]) + int'(top[4*p+2]) + int'(top[4*p+3]));
              s += int'(top[4*p]) + int'(top[4*p+1]) + int'(top[4*p+2]) + int'(top[4*p+3]);
            end
            pb <= 20'(s);
            acc_cnt <= 1'b1;
          end else begin
            // second cycle: left quads accumulated onto the top sums
            int s;
            s = 0;
            for (int p = 0; p < 4; p++) begin
              d_reg[p] <= d_reg[p] + 20'(int'(left[4*p]) + int'(left[4*p+1]) + int'(left[4*p+2]) + int'(left[4*p+3]));
              s += int'(left[4*p]) + int'(left[4*p+1]) + int'(left[4*p+2]) + int'(left[4*p+3]);
            end
            pc <= 20'(s);
            state <= S_OUT;
          end
        end
        S_PLANE: begin
          logic signed [19:0] base;
          base = pa_c + 20'sd16 - ((blk_q == IP_I16) ? 20'sd7 : 20'sd3) * (pb_c + pc_c);
          pb <= pb_c; pc <= pc_c; row_base <= base;
          for (int p = 0; p < 4; p++) d_reg[p] <= base + 20'(p) * pb_c;
          state <= S_OUT;
        end
        S_OUT: begin
          if (last_out) state <= S_IDLE;
          if (cfg == C_RECUR) begin
            if ((blk_q == IP_I16 && xq_q == 2'd3) || (blk_q != IP_I16 && xq_q == 2'd1)) begin
              // next row: add the vertical gradient to the row start
              row_base <= row_base + pc;
              for (int p = 0; p < 4; p++) d_reg[p] <= row_base + pc + 20'(p) * pb;
            end else begin
              for (int p = 0; p < 4; p++) d_reg[p] <= d_reg[p] + (pb <<< 2);
            end
          end
          if ((blk_q == IP_I16 && xq_q == 2'd3) || (blk_q == IP_CHROMA && xq_q == 2'd1) ||
              blk_q == IP_I4) begin
            xq_q <= '0;
            y_q  <= y_q + 4'd1;
          end else begin
            xq_q <= xq_q + 2'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
