// h264_codec_top: the encoder core and the decoder core of the H.264/AVC codec side by
// side. The two are separate designs (an encoder chip and a decoder chip) that share
// only the package of types; each keeps its own ports, prefixed enc_ and dec_, with one
// clock and reset for both. The encoder core (h264_enc_core) is the four-stage
// macroblock pipeline with the integer motion estimator and the intra predictor
// generator built in, and start/done ports for the FME and EC/DB stages. The decoder
// core (h264_dec_core) is the hybrid 4x4-block / macroblock pipeline with the parser's
// Exp-Golomb decoder, inverse quantisation/transform, intra and inter prediction and
// sum-and-clip. The system and local buses, the host processor, the external memories
// and the remaining engines connect at these ports. Parameters are the encoder's, with
// the document's defaults (eight candidates per cycle, search range H[-64,+63]
// V[-32,+31], 5-bit pixel truncation, half sub-sampling, up to 80 MBs per row).
module h264_codec_top
  import h264_pkg::*;
#(
  parameter int NCAND     = 8,
  parameter int SRH       = 64,
  parameter int SRV       = 32,
  parameter int PIX_BITS  = 5,
  parameter bit SUBSAMPLE = 1'b1,
  parameter int MAX_MB_W  = 80
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_frame_start,
  input  logic [11:0] enc_frame_w,
  input  logic [11:0] enc_frame_h,
  input  logic [7:0] enc_sr_h,
  input  logic [7:0] enc_sr_v,
  input  logic [7:0] enc_lambda,
  output logic enc_busy,
  output logic enc_frame_done,
  output logic [31:0] enc_wait_cycles,
  output logic enc_sys_req,
  output logic [11:0] enc_sys_x,
  output logic [11:0] enc_sys_y,
  input  pixel_t enc_sys_rdata [16],
  output logic enc_loc_req,
  output logic [11:0] enc_loc_x,
  output logic [11:0] enc_loc_y,
  input  logic enc_loc_ready,
  input  pixel_t enc_loc_rdata,
  output logic enc_fme_start,
  output logic [15:0] enc_fme_mb,
  output mv_t enc_fme_imv [NUM_VBS],
  output logic [COST_W-1:0] enc_fme_icost [NUM_VBS],
  input  logic enc_fme_done,
  output logic enc_ip_start,
  output logic [15:0] enc_ip_mb,
  input  logic [3:0] enc_ip_mode,
  input  pixel_t enc_ip_top [16],
  input  pixel_t enc_ip_left [16],
  input  pixel_t enc_ip_ul,
  input  logic enc_ip_avail_top,
  input  logic enc_ip_avail_left,
  output logic enc_ip_pred_valid,
  output logic [3:0] enc_ip_pred_y,
  output logic [1:0] enc_ip_pred_xq,
  output pixel_t enc_ip_pred [4],
  input  mv_t enc_ip_mv_left,
  input  mv_t enc_ip_mv_right,
  output logic enc_ecdb_start,
  output logic [15:0] enc_ecdb_mb,
  input  logic enc_ecdb_done,
  output logic [31:0] enc_sw_loaded,
  input  logic dec_eg_in_valid,
  input  logic [31:0] dec_eg_bits,
  input  logic dec_eg_signed,
  output logic dec_eg_out_valid,
  output logic [5:0] dec_eg_len,
  output logic signed [31:0] dec_eg_value,
  output logic dec_eg_err,
  input  logic dec_blk_valid,
  output logic dec_blk_ready,
  input  logic signed [15:0] dec_blk_coef [16],
  input  logic [5:0] dec_blk_qp,
  input  logic [1:0] dec_blk_x4,
  input  logic [1:0] dec_blk_y4,
  input  logic dec_blk_intra,
  input  logic dec_ipm_prev_flag,
  input  logic [2:0] dec_ipm_rem,
  input  logic dec_ipm_avail_a,
  input  logic dec_ipm_avail_b,
  input  logic dec_ipm_i4_a,
  input  logic dec_ipm_i4_b,
  input  logic [3:0] dec_ipm_mode_a,
  input  logic [3:0] dec_ipm_mode_b,
  input  pixel_t dec_nb_top [8],
  input  pixel_t dec_nb_left [4],
  input  pixel_t dec_nb_ul,
  input  logic dec_nb_avail_top,
  input  logic dec_nb_avail_left,
  input  logic dec_nb_avail_tr,
  output logic dec_rec_valid,
  output logic [1:0] dec_rec_x4,
  output logic [1:0] dec_rec_y4,
  output logic [3:0] dec_rec_mode,
  output pixel_t dec_rec [4][4],
  input  logic dec_inter_start,
  input  logic [11:0] dec_part_x,
  input  logic [11:0] dec_part_y,
  input  logic [2:0] dec_part_w4,
  input  logic [2:0] dec_part_h4,
  input  mv_t dec_mvd,
  input  mv_t dec_nmv_a,
  input  mv_t dec_nmv_b,
  input  mv_t dec_nmv_c,
  input  mv_t dec_nmv_d,
  input  logic signed [7:0] dec_nref_a,
  input  logic signed [7:0] dec_nref_b,
  input  logic signed [7:0] dec_nref_c,
  input  logic signed [7:0] dec_nref_d,
  input  logic dec_navail_a,
  input  logic dec_navail_b,
  input  logic dec_navail_c,
  input  logic dec_navail_d,
  input  logic signed [7:0] dec_cur_ref,
  input  logic [2:0] dec_part_shape,
  input  logic [11:0] dec_frame_w,
  input  logic [11:0] dec_frame_h,
  output logic dec_inter_busy,
  output logic dec_inter_done,
  output mv_t dec_inter_mv,
  output logic [31:0] dec_mc_fetched,
  output logic dec_ext_req,
  output logic [11:0] dec_ext_x,
  output logic [11:0] dec_ext_y,
  input  logic dec_ext_ready,
  input  pixel_t dec_ext_rdata
);

  h264_enc_core #(.NCAND(NCAND), .SRH(SRH), .SRV(SRV), .PIX_BITS(PIX_BITS),
                  .SUBSAMPLE(SUBSAMPLE), .MAX_MB_W(MAX_MB_W)) u_enc (
    .clk, .rst_n,
    .frame_start(enc_frame_start),
    .frame_w(enc_frame_w),
    .frame_h(enc_frame_h),
    .sr_h(enc_sr_h),
    .sr_v(enc_sr_v),
    .lambda(enc_lambda),
    .busy(enc_busy),
    .frame_done(enc_frame_done),
    .wait_cycles(enc_wait_cycles),
    .sys_req(enc_sys_req),
    .sys_x(enc_sys_x),
    .sys_y(enc_sys_y),
    .sys_rdata(enc_sys_rdata),
    .loc_req(enc_loc_req),
    .loc_x(enc_loc_x),
    .loc_y(enc_loc_y),
    .loc_ready(enc_loc_ready),
    .loc_rdata(enc_loc_rdata),
    .fme_start(enc_fme_start),
    .fme_mb(enc_fme_mb),
    .fme_imv(enc_fme_imv),
    .fme_icost(enc_fme_icost),
    .fme_done(enc_fme_done),
    .ip_start(enc_ip_start),
    .ip_mb(enc_ip_mb),
    .ip_mode(enc_ip_mode),
    .ip_top(enc_ip_top),
    .ip_left(enc_ip_left),
    .ip_ul(enc_ip_ul),
    .ip_avail_top(enc_ip_avail_top),
    .ip_avail_left(enc_ip_avail_left),
    .ip_pred_valid(enc_ip_pred_valid),
    .ip_pred_y(enc_ip_pred_y),
    .ip_pred_xq(enc_ip_pred_xq),
    .ip_pred(enc_ip_pred),
    .ip_mv_left(enc_ip_mv_left),
    .ip_mv_right(enc_ip_mv_right),
    .ecdb_start(enc_ecdb_start),
    .ecdb_mb(enc_ecdb_mb),
    .ecdb_done(enc_ecdb_done),
    .sw_loaded(enc_sw_loaded)
  );

  h264_dec_core u_dec (
    .clk, .rst_n,
    .eg_in_valid(dec_eg_in_valid),
    .eg_bits(dec_eg_bits),
    .eg_signed(dec_eg_signed),
    .eg_out_valid(dec_eg_out_valid),
    .eg_len(dec_eg_len),
    .eg_value(dec_eg_value),
    .eg_err(dec_eg_err),
    .blk_valid(dec_blk_valid),
    .blk_ready(dec_blk_ready),
    .blk_coef(dec_blk_coef),
    .blk_qp(dec_blk_qp),
    .blk_x4(dec_blk_x4),
    .blk_y4(dec_blk_y4),
    .blk_intra(dec_blk_intra),
    .ipm_prev_flag(dec_ipm_prev_flag),
    .ipm_rem(dec_ipm_rem),
    .ipm_avail_a(dec_ipm_avail_a),
    .ipm_avail_b(dec_ipm_avail_b),
    .ipm_i4_a(dec_ipm_i4_a),
    .ipm_i4_b(dec_ipm_i4_b),
    .ipm_mode_a(dec_ipm_mode_a),
    .ipm_mode_b(dec_ipm_mode_b),
    .nb_top(dec_nb_top),
    .nb_left(dec_nb_left),
    .nb_ul(dec_nb_ul),
    .nb_avail_top(dec_nb_avail_top),
    .nb_avail_left(dec_nb_avail_left),
    .nb_avail_tr(dec_nb_avail_tr),
    .rec_valid(dec_rec_valid),
    .rec_x4(dec_rec_x4),
    .rec_y4(dec_rec_y4),
    .rec_mode(dec_rec_mode),
    .rec(dec_rec),
    .inter_start(dec_inter_start),
    .part_x(dec_part_x),
    .part_y(dec_part_y),
    .part_w4(dec_part_w4),
    .part_h4(dec_part_h4),
    .mvd(dec_mvd),
    .nmv_a(dec_nmv_a),
    .nmv_b(dec_nmv_b),
    .nmv_c(dec_nmv_c),
    .nmv_d(dec_nmv_d),
    .nref_a(dec_nref_a),
    .nref_b(dec_nref_b),
    .nref_c(dec_nref_c),
    .nref_d(dec_nref_d),
    .navail_a(dec_navail_a),
    .navail_b(dec_navail_b),
    .navail_c(dec_navail_c),
    .navail_d(dec_navail_d),
    .cur_ref(dec_cur_ref),
    .part_shape(dec_part_shape),
    .frame_w(dec_frame_w),
    .frame_h(dec_frame_h),
    .inter_busy(dec_inter_busy),
    .inter_done(dec_inter_done),
    .inter_mv(dec_inter_mv),
    .mc_fetched(dec_mc_fetched),
    .ext_req(dec_ext_req),
    .ext_x(dec_ext_x),
    .ext_y(dec_ext_y),
    .ext_ready(dec_ext_ready),
    .ext_rdata(dec_ext_rdata)
  );

endmodule
