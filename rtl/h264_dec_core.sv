// h264_dec_core: the decoder's hybrid-pipelined reconstruction path.
//
// The decoder mixes three pipelining granularities. Entropy decoding, inverse
// quantisation/transform and intra prediction work on 4x4 blocks (4x4-block pipeline),
// which keeps the buffers between them at one block. Inter prediction works per
// macroblock partition (MB pipeline) so that reference windows of neighbouring 4x4
// blocks are read once; its output waits in the Inter-Predicted MB Buffer until the
// residual blocks arrive. Deblocking (frame/MB pipeline) is outside this core.
//
// 4x4-block path: a block enters with its 16 levels in scan order, its QP, and, if
// intra, the syntax of its 4x4 intra mode and its neighbour pixels. intra_mode_pred
// gives the mode; iqit_engine and intra_pred_gen run side by side (the predictor
// takes 4 or 5 cycles, four pixels a cycle); for an inter block the prediction is read
// from the Inter-Predicted MB Buffer at the block's position. sum_clip then gives the
// reconstructed block. One block takes 7 cycles from acceptance (intra DC: 8), 4 for
// inter.
// Inter path: a partition enters with its position, size, MV difference and the MV
// prediction neighbours; mv_pred gives the predictor, mvp + mvd is the MV, and
// mc_engine fills the Inter-Predicted MB Buffer at the partition's place.
// The parser's Exp-Golomb decoder is brought out on its own ports.
// The split into engines and buffers follows the document's decoder diagram; the
// handshakes and the sequencing of one block at a time are this design's.
module h264_dec_core
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // parser: Exp-Golomb decoding
  input  logic               eg_in_valid,
  input  logic [31:0]        eg_bits,
  input  logic               eg_signed,
  output logic               eg_out_valid,
  output logic [5:0]         eg_len,
  output logic signed [31:0] eg_value,
  output logic               eg_err,
  // 4x4 residual block
  input  logic               blk_valid,
  output logic               blk_ready,
  input  logic signed [15:0] blk_coef [16],
  input  logic [5:0]         blk_qp,
  input  logic [1:0]         blk_x4,
  input  logic [1:0]         blk_y4,
  input  logic               blk_intra,
  input  logic               ipm_prev_flag,
  input  logic [2:0]         ipm_rem,
  input  logic               ipm_avail_a,
  input  logic               ipm_avail_b,
  input  logic               ipm_i4_a,
  input  logic               ipm_i4_b,
  input  logic [3:0]         ipm_mode_a,
  input  logic [3:0]         ipm_mode_b,
  input  pixel_t             nb_top  [8],
  input  pixel_t             nb_left [4],
  input  pixel_t             nb_ul,
  input  logic               nb_avail_top,
  input  logic               nb_avail_left,
  input  logic               nb_avail_tr,
  output logic               rec_valid,
  output logic [1:0]         rec_x4,
  output logic [1:0]         rec_y4,
  output logic [3:0]         rec_mode,
  output pixel_t             rec [4][4],
  // inter partition
  input  logic               inter_start,
  input  logic [11:0]        part_x,
  input  logic [11:0]        part_y,
  input  logic [2:0]         part_w4,
  input  logic [2:0]         part_h4,
  input  mv_t                mvd,
  input  mv_t                nmv_a, nmv_b, nmv_c, nmv_d,
  input  logic signed [7:0]  nref_a, nref_b, nref_c, nref_d,
  input  logic               navail_a, navail_b, navail_c, navail_d,
  input  logic signed [7:0]  cur_ref,
  input  logic [2:0]         part_shape,
  input  logic [11:0]        frame_w,
  input  logic [11:0]        frame_h,
  output logic               inter_busy,
  output logic               inter_done,
  output mv_t                inter_mv,
  output logic [31:0]        mc_fetched,
  // local bus: reference frame pixels
  output logic               ext_req,
  output logic [11:0]        ext_x,
  output logic [11:0]        ext_y,
  input  logic               ext_ready,
  input  pixel_t             ext_rdata
);

  // ---------------- parser
  expgolomb_dec u_eg (
    .clk, .rst_n, .in_valid(eg_in_valid), .bits(eg_bits), .is_signed(eg_signed),
    .out_valid(eg_out_valid), .len(eg_len), .value(eg_value), .err(eg_err)
  );

  // ---------------- inter prediction (MB pipeline)
  mv_t mvp, mv_q;
  mv_pred u_mvp (
    .mv_a(nmv_a), .mv_b(nmv_b), .mv_c(nmv_c), .mv_d(nmv_d),
    .ref_a(nref_a), .ref_b(nref_b), .ref_c(nref_c), .ref_d(nref_d),
    .avail_a(navail_a), .avail_b(navail_b), .avail_c(navail_c), .avail_d(navail_d),
    .cur_ref, .shape(part_shape), .mvp
  );

  mv_t mv_now;
  assign mv_now.x = mvp.x + mvd.x;
  assign mv_now.y = mvp.y + mvd.y;

  logic       mc_out_valid;
  logic [1:0] mc_bx, mc_by;
  pixel_t     mc_pred [4][4];
  logic [1:0] px4_q, py4_q;
  pixel_t     inter_buf [16][16];   // Inter-Predicted MB Buffer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_q <= '0; px4_q <= '0; py4_q <= '0;
    end else if (inter_start && !inter_busy) begin
      mv_q  <= mv_now;
      px4_q <= part_x[3:2];
      py4_q <= part_y[3:2];
    end
  end
  assign inter_mv = mv_q;

  mc_engine u_mc (
    .clk, .rst_n, .start(inter_start), .blk_x(part_x), .blk_y(part_y), .part_w4, .part_h4,
    .mv(mv_now), .frame_w, .frame_h, .busy(inter_busy),
    .ext_req, .ext_x, .ext_y, .ext_ready, .ext_rdata,
    .out_valid(mc_out_valid), .out_bx(mc_bx), .out_by(mc_by), .out_pred(mc_pred),
    .done(inter_done), .fetched(mc_fetched)
  );

  always_ff @(posedge clk) begin
    if (mc_out_valid)
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          inter_buf[4*(int'(py4_q) + int'(mc_by)) + r][4*(int'(px4_q) + int'(mc_bx)) + c] <= mc_pred[r][c];
  end

  // ---------------- 4x4-block pipeline
  typedef enum logic [1:0] {B_IDLE, B_PRED, B_SUM, B_OUT} bstate_e;
  bstate_e bst;
  logic [3:0] i4_mode, mode_q;
  logic [3:0] unused_pm;
  logic [1:0] x4_q, y4_q;
  logic       intra_q, ip_go;

  intra_mode_pred u_ipm (
    .avail_a(ipm_avail_a), .avail_b(ipm_avail_b), .is_i4_a(ipm_i4_a), .is_i4_b(ipm_i4_b),
    .mode_a(ipm_mode_a), .mode_b(ipm_mode_b), .prev_flag(ipm_prev_flag), .rem_mode(ipm_rem),
    .pred_mode(unused_pm), .mode(i4_mode)
  );

  logic               iq_valid;
  logic signed [15:0] iq_res [4][4];
  logic signed [15:0] res_q  [4][4];
  iqit_engine u_iqit (
    .clk, .rst_n, .in_valid(blk_valid && blk_ready), .coef(blk_coef), .qp(blk_qp),
    .out_valid(iq_valid), .res(iq_res)
  );

  // intra predictor inputs held for the block
  pixel_t top_q [16], left_q [16], ul_q;
  logic   at_q, al_q, atr_q;
  logic   ipg_busy, ipg_valid, ipg_done;
  logic [3:0] ipg_y;
  logic [1:0] ipg_xq;
  pixel_t ipg_pred [4];
  intra_pred_gen u_ipg (
    .clk, .rst_n, .start(ip_go), .blk(IP_I4), .mode(mode_q), .avail_top(at_q),
    .avail_left(al_q), .avail_tr(atr_q), .top(top_q), .left(left_q), .ul(ul_q),
    .busy(ipg_busy), .out_valid(ipg_valid), .out_y(ipg_y), .out_xq(ipg_xq), .pred(ipg_pred),
    .done(ipg_done)
  );

  pixel_t pred_q [4][4];
  logic   sum_go;
  logic   sc_valid;
  pixel_t sc_rec [4][4];
  sum_clip u_sum (
    .clk, .rst_n, .in_valid(sum_go), .pred(pred_q), .res(res_q), .out_valid(sc_valid), .rec(sc_rec)
  );

  assign blk_ready = (bst == B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst <= B_IDLE; mode_q <= '0; x4_q <= '0; y4_q <= '0; intra_q <= 1'b0; ip_go <= 1'b0;
      at_q <= 1'b0; al_q <= 1'b0; atr_q <= 1'b0; ul_q <= '0; sum_go <= 1'b0;
      for (int i = 0; i < 16; i++) begin top_q[i] <= '0; left_q[i] <= '0; end
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin pred_q[r][c] <= '0; res_q[r][c] <= '0; end
    end else begin
      ip_go  <= 1'b0;
      sum_go <= 1'b0;
      if (iq_valid) res_q <= iq_res;
      case (bst)
        B_IDLE: if (blk_valid) begin
          x4_q <= blk_x4; y4_q <= blk_y4; intra_q <= blk_intra;
          mode_q <= blk_intra ? i4_mode : 4'd0;
          for (int i = 0; i < 8; i++) top_q[i] <= nb_top[i];
          for (int i = 0; i < 4; i++) left_q[i] <= nb_left[i];
          ul_q <= nb_ul; at_q <= nb_avail_top; al_q <= nb_avail_left; atr_q <= nb_avail_tr;
          if (blk_intra) begin
            ip_go <= 1'b1;
            bst   <= B_PRED;
          end else begin
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++)
                pred_q[r][c] <= inter_buf[4*int'(blk_y4) + r][4*int'(blk_x4) + c];
            bst <= B_SUM;
          end
        end
        B_PRED: if (ipg_valid) begin
          pred_q[ipg_y[1:0]] <= ipg_pred;
          if (ipg_done) bst <= B_SUM;
        end
        B_SUM: begin
          sum_go <= 1'b1;
          bst    <= B_OUT;
        end
        B_OUT: if (sc_valid) bst <= B_IDLE;
        default: bst <= B_IDLE;
      endcase
    end
  end

  assign rec_valid = sc_valid;
  assign rec       = sc_rec;
  assign rec_x4    = x4_q;
  assign rec_y4    = y4_q;
  assign rec_mode  = mode_q;

  logic unused_ok;
  assign unused_ok = ^{unused_pm, ipg_busy, ipg_xq, ipg_y[3:2], intra_q};

endmodule
