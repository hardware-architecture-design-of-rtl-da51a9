// mv_pred: motion vector prediction of the decoder (and the exact predictor the encoder
// replaces by its modified one). Neighbours are A (left), B (above), C (above right) and
// D (above left); C is replaced by D when C is unavailable. For 16x8 and 8x16 partitions
// the directional rule comes first (upper 16x8: B, lower 16x8: A, left 8x16: A, right
// 8x16: C, each when its reference index matches). Otherwise: if B and C are unavailable
// and A is available, A is used for all three; if exactly one neighbour has the current
// reference index, its MV is the predictor; else the component-wise median of A, B, C.
// An unavailable neighbour counts as MV (0,0) with reference -1. The document states the
// median rule; the special cases are the H.264 standard's. Combinational. MVs in quarter
// pixels.
module mv_pred
  import h264_pkg::*;
(
  input  mv_t              mv_a, mv_b, mv_c, mv_d,
  input  logic signed [7:0] ref_a, ref_b, ref_c, ref_d,
  input  logic             avail_a, avail_b, avail_c, avail_d,
  input  logic signed [7:0] cur_ref,
  input  logic [2:0]       shape,   // 0 other, 1 16x8 upper, 2 16x8 lower, 3 8x16 left, 4 8x16 right
  output mv_t              mvp
);

  function automatic logic signed [15:0] med3(input logic signed [15:0] a,
                                              input logic signed [15:0] b,
                                              input logic signed [15:0] c);
    logic signed [15:0] mx, mn;
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    if (c > mx)      return mx;
    else if (c < mn) return mn;
    else             return c;
  endfunction

  always_comb begin
    mv_t a, b, c;
    logic signed [7:0] ra, rb, rc;
    logic va, vb, vc;
    a = avail_a ? mv_a : '0;  ra = avail_a ? ref_a : -8'sd1; va = avail_a;
    b = avail_b ? mv_b : '0;  rb = avail_b ? ref_b : -8'sd1; vb = avail_b;
    if (avail_c) begin c = mv_c; rc = ref_c; vc = 1'b1; end
    else if (avail_d) begin c = mv_d; rc = ref_d; vc = 1'b1; end
    else begin c = '0; rc = -8'sd1; vc = 1'b0; end
    if (shape == 3'd1 && rb == cur_ref)      mvp = b;
    else if (shape == 3'd2 && ra == cur_ref) mvp = a;
    else if (shape == 3'd3 && ra == cur_ref) mvp = a;
    else if (shape == 3'd4 && rc == cur_ref) mvp = c;
    else begin
      if (!vb && !vc && va) begin
        b = a; c = a; rb = ra; rc = ra;
      end
      if (ra == cur_ref && rb != cur_ref && rc != cur_ref)      mvp = a;
      else if (rb == cur_ref && ra != cur_ref && rc != cur_ref) mvp = b;
      else if (rc == cur_ref && ra != cur_ref && rb != cur_ref) mvp = c;
      else begin
        mvp.x = med3(a.x, b.x, c.x);
        mvp.y = med3(a.y, b.y, c.y);
      end
    end
  end

endmodule
