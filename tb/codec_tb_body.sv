// codec_tb_body: end-to-end test of h264_codec_top, shared by the reduced-size and the
// full-size testbench (FULL selects the top's default parameters).
//
// Encoder: a 64x32 frame (4x2 macroblocks) whose current picture is the reference moved
// by (3,-2) plus noise. Bus models serve the current MB rows (system bus) and reference
// pixels with random stalls (local bus). Models of the FME, IP-side and EC/DB stages
// answer their start pulses after random times, so stages wait for each other. For every
// MB, the 16x16 integer MV and cost handed to the FME are compared with a software full
// search using the modified MV predictor built from the MVs the IP stage wrote back for
// the row above; the intra predictors of the IP stage (vertical, horizontal, DC) are
// compared with their definition.
// Decoder: Exp-Golomb codes; an inter macroblock made of four 8x8 partitions (MV
// predictor + MV difference, motion compensation) followed by its 16 residual blocks;
// and 16 intra 4x4 blocks covering all nine modes, chosen through the mode-prediction
// syntax. Reconstructed blocks are compared with prediction + inverse-transformed
// residual computed by the reference models.
// Mechanisms counted: pipeline waits, whole and partial search-window loads, local-bus
// stalls, MVs predicted from the row above, each intra 4x4 mode, inter and intra blocks,
// MC partitions with fractional MVs.
module codec_tb_body #(
  parameter bit FULL = 1'b0
) ();
  import h264_pkg::*;
  import h264_tb_ref::*;

  localparam int FW = 64, FH = 32, MBW = 4, MBH = 2, NMB = 8;
  localparam int SRH = FULL ? 64 : 16, SRV = FULL ? 32 : 8;
  localparam int COLS = 2*SRH + 16, ROWS = 2*SRV + 15;
  localparam int WDOG = FULL ? 2000000 : 400000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // encoder ports
  logic enc_frame_start, enc_busy, enc_frame_done, enc_sys_req, enc_loc_req, enc_loc_ready;
  logic [11:0] enc_sys_x, enc_sys_y, enc_loc_x, enc_loc_y;
  logic [7:0] enc_sr_h, enc_sr_v, enc_lambda;
  logic [31:0] enc_wait_cycles, enc_sw_loaded;
  pixel_t enc_sys_rdata[16], enc_loc_rdata;
  logic enc_fme_start, enc_fme_done, enc_ip_start, enc_ecdb_start, enc_ecdb_done;
  logic [15:0] enc_fme_mb, enc_ip_mb, enc_ecdb_mb;
  mv_t enc_fme_imv[NUM_VBS]; logic [COST_W-1:0] enc_fme_icost[NUM_VBS];
  logic [3:0] enc_ip_mode; pixel_t enc_ip_top[16], enc_ip_left[16], enc_ip_ul;
  logic enc_ip_avail_top, enc_ip_avail_left, enc_ip_pred_valid;
  logic [3:0] enc_ip_pred_y; logic [1:0] enc_ip_pred_xq; pixel_t enc_ip_pred[4];
  mv_t enc_ip_mv_left, enc_ip_mv_right;
  // decoder ports
  logic dec_eg_in_valid, dec_eg_signed, dec_eg_out_valid, dec_eg_err;
  logic [31:0] dec_eg_bits; logic [5:0] dec_eg_len; logic signed [31:0] dec_eg_value;
  logic dec_blk_valid, dec_blk_ready, dec_blk_intra; logic signed [15:0] dec_blk_coef[16];
  logic [5:0] dec_blk_qp; logic [1:0] dec_blk_x4, dec_blk_y4;
  logic dec_ipm_prev_flag, dec_ipm_avail_a, dec_ipm_avail_b, dec_ipm_i4_a, dec_ipm_i4_b;
  logic [2:0] dec_ipm_rem; logic [3:0] dec_ipm_mode_a, dec_ipm_mode_b;
  pixel_t dec_nb_top[8], dec_nb_left[4], dec_nb_ul;
  logic dec_nb_avail_top, dec_nb_avail_left, dec_nb_avail_tr;
  logic dec_rec_valid; logic [1:0] dec_rec_x4, dec_rec_y4; logic [3:0] dec_rec_mode;
  pixel_t dec_rec[4][4];
  logic dec_inter_start, dec_inter_busy, dec_inter_done;
  logic [11:0] dec_part_x, dec_part_y, dec_frame_w, dec_frame_h; logic [2:0] dec_part_w4, dec_part_h4;
  mv_t dec_mvd, dec_nmv_a, dec_nmv_b, dec_nmv_c, dec_nmv_d, dec_inter_mv;
  logic signed [7:0] dec_nref_a, dec_nref_b, dec_nref_c, dec_nref_d, dec_cur_ref;
  logic dec_navail_a, dec_navail_b, dec_navail_c, dec_navail_d; logic [2:0] dec_part_shape;
  logic [31:0] dec_mc_fetched;
  logic dec_ext_req, dec_ext_ready; logic [11:0] dec_ext_x, dec_ext_y; pixel_t dec_ext_rdata;

  if (FULL) begin : g_full
    h264_codec_top dut (.*, .enc_frame_w(12'(FW)), .enc_frame_h(12'(FH)));
  end else begin : g_small
    h264_codec_top #(.SRH(16), .SRV(8), .MAX_MB_W(8)) dut (.*, .enc_frame_w(12'(FW)), .enc_frame_h(12'(FH)));
  end

  int checks = 0, failures = 0;
  int n_wait = 0, n_full_load = 0, n_part_load = 0, n_loc_stall = 0, n_mvp_up = 0;
  int n_mode[9], n_inter_blk = 0, n_intra_blk = 0, n_frac_part = 0, n_ip_rows = 0;

  // ---------------- bus models
  always @(posedge clk) begin
    for (int i = 0; i < 16; i++) enc_sys_rdata[i] <= cf[enc_sys_y][enc_sys_x + 12'(i)];
    enc_loc_ready <= ($urandom_range(0, 4) != 0);
    if (enc_loc_req && !enc_loc_ready) n_loc_stall++;
    if (enc_loc_req && enc_loc_ready) enc_loc_rdata <= rf[enc_loc_y][enc_loc_x];
    dec_ext_ready <= ($urandom_range(0, 3) != 0);
    if (dec_ext_req && dec_ext_ready) dec_ext_rdata <= rf[dec_ext_y][dec_ext_x];
  end

  // ---------------- encoder stage models
  // MVs (quarter pixels) the IP stage writes back for MB n
  function automatic int fl_x(input int n); return 4*n + 1; endfunction
  function automatic int fl_y(input int n); return -n;      endfunction
  function automatic int fr_x(input int n); return -3*n;    endfunction
  function automatic int fr_y(input int n); return n + 2;   endfunction
  function automatic int med(input int a, input int b, input int c);
    int t;
    if (a > b) begin t = a; a = b; b = t; end
    if (b > c) begin t = b; b = c; c = t; end
    if (a > b) begin t = a; a = b; b = t; end
    return b;
  endfunction

  int fme_cnt = 0, ecdb_cnt = 0, ip_mb_q = 0;
  always @(posedge clk) begin
    enc_fme_done <= 1'b0;
    enc_ecdb_done <= 1'b0;
    if (fme_cnt > 0) begin fme_cnt <= fme_cnt - 1; if (fme_cnt == 1) enc_fme_done <= 1'b1; end
    if (ecdb_cnt > 0) begin ecdb_cnt <= ecdb_cnt - 1; if (ecdb_cnt == 1) enc_ecdb_done <= 1'b1; end
    if (enc_fme_start) begin
      int n, mbx, mby, px, py, best, bx, by;
      fme_cnt <= FULL ? $urandom_range(1, 3000) : $urandom_range(1, 900);
      n = enc_fme_mb; mbx = n % MBW; mby = n / MBW;
      if (mby == 0) begin px = 0; py = 0; end
      else begin
        int u;
        u = n - MBW;
        px = med(mbx > 0 ? fr_x(u-1) : 0, fl_x(u), mbx < MBW-1 ? fl_x(u+1) : 0);
        py = med(mbx > 0 ? fr_y(u-1) : 0, fl_y(u), mbx < MBW-1 ? fl_y(u+1) : 0);
        if (px != 0 || py != 0) n_mvp_up++;
      end
      ime16(mbx, mby, SRH, SRV, 4, px, py, best, bx, by);
      checks++;
      if (int'(enc_fme_icost[VBS_16X16]) != best || int'(enc_fme_imv[VBS_16X16].x) != bx ||
          int'(enc_fme_imv[VBS_16X16].y) != by) begin
        failures++;
        $display("FAIL enc MB %0d: 16x16 cost %0d mv (%0d,%0d), expected %0d (%0d,%0d)", n,
                 enc_fme_icost[VBS_16X16], enc_fme_imv[VBS_16X16].x, enc_fme_imv[VBS_16X16].y, best, bx, by);
      end
      if (mbx == 0) n_full_load++; else n_part_load++;
    end
    if (enc_ecdb_start) ecdb_cnt <= $urandom_range(1, 200);
    if (enc_ip_start) ip_mb_q <= enc_ip_mb;
  end

  // IP stage: mode by MB, write-back MVs by MB, predictor check
  assign enc_ip_mode = 4'(enc_ip_mb % 3);
  always_comb begin
    enc_ip_mv_left.x  = 16'(fl_x(int'(enc_ip_mb)));
    enc_ip_mv_left.y  = 16'(fl_y(int'(enc_ip_mb)));
    enc_ip_mv_right.x = 16'(fr_x(int'(enc_ip_mb)));
    enc_ip_mv_right.y = 16'(fr_y(int'(enc_ip_mb)));
  end
  always @(posedge clk) if (enc_ip_pred_valid) begin
    n_ip_rows++;
    for (int p = 0; p < 4; p++) begin
      int x, e, s;
      x = int'(enc_ip_pred_xq)*4 + p;
      s = 0; for (int i = 0; i < 16; i++) s += int'(enc_ip_top[i]) + int'(enc_ip_left[i]);
      case (enc_ip_mode)
        0: e = int'(enc_ip_top[x]);
        1: e = int'(enc_ip_left[enc_ip_pred_y]);
        default: e = (s + 16) >> 5;
      endcase
      checks++;
      if (int'(enc_ip_pred[p]) != e) begin
        failures++; $display("FAIL enc IP mode %0d (%0d,%0d)", enc_ip_mode, x, enc_ip_pred_y);
      end
    end
  end

  // ---------------- decoder helpers
  int lev[16], qp_cur;
  task automatic dec_block(input int x4, input int y4, input bit intra, input int mode,
                           input int pmode_a, input int pmode_b, output int rec_got[4][4]);
    int r[4][4];
    @(negedge clk);
    qp_cur = $urandom_range(20, 36);
    for (int i = 0; i < 16; i++) begin
      lev[i] = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 8)) - 4 : 0;
      dec_blk_coef[i] = 16'(lev[i]);
    end
    dec_blk_qp = 6'(qp_cur); dec_blk_x4 = 2'(x4); dec_blk_y4 = 2'(y4); dec_blk_intra = intra;
    // mode-prediction syntax for the wanted mode
    dec_ipm_avail_a = 1; dec_ipm_avail_b = 1; dec_ipm_i4_a = 1; dec_ipm_i4_b = 1;
    dec_ipm_mode_a = 4'(pmode_a); dec_ipm_mode_b = 4'(pmode_b);
    begin
      int pm;
      pm = pmode_a < pmode_b ? pmode_a : pmode_b;
      dec_ipm_prev_flag = (mode == pm);
      dec_ipm_rem = 3'(mode < pm ? mode : mode - 1);
    end
    dec_blk_valid = 1;
    while (!dec_blk_ready) @(negedge clk);
    @(negedge clk);
    dec_blk_valid = 0;
    while (!dec_rec_valid) @(negedge clk);
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) rec_got[y][x] = int'(dec_rec[y][x]);
    if (intra) begin checks++; if (int'(dec_rec_mode) != mode) failures++; end
  endtask

  initial begin
    // frames
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        rf[y][x] = pixel_t'(128 + 60 * ((x / 5 + y / 3) % 3) - 40 + $urandom_range(0, 30));
    rf_w = FW; rf_h = FH;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        cf[y][x] = pixel_t'(gi(x + 3, y - 2) + $urandom_range(0, 4));
    for (int i = 0; i < 9; i++) n_mode[i] = 0;
    enc_frame_start = 0; enc_sr_h = 8'(SRH); enc_sr_v = 8'(SRV); enc_lambda = 8'd4;
    for (int i = 0; i < 16; i++) begin
      enc_ip_top[i] = pixel_t'($urandom); enc_ip_left[i] = pixel_t'($urandom);
    end
    enc_ip_ul = 8'd77; enc_ip_avail_top = 1; enc_ip_avail_left = 1;
    dec_eg_in_valid = 0; dec_eg_signed = 0; dec_eg_bits = 0; dec_blk_valid = 0;
    dec_blk_intra = 0; dec_blk_qp = 0; dec_blk_x4 = 0; dec_blk_y4 = 0;
    for (int i = 0; i < 16; i++) dec_blk_coef[i] = 0;
    dec_ipm_prev_flag = 0; dec_ipm_rem = 0; dec_ipm_avail_a = 0; dec_ipm_avail_b = 0;
    dec_ipm_i4_a = 0; dec_ipm_i4_b = 0; dec_ipm_mode_a = 0; dec_ipm_mode_b = 0;
    for (int i = 0; i < 8; i++) dec_nb_top[i] = 0;
    for (int i = 0; i < 4; i++) dec_nb_left[i] = 0;
    dec_nb_ul = 0; dec_nb_avail_top = 1; dec_nb_avail_left = 1; dec_nb_avail_tr = 1;
    dec_inter_start = 0; dec_part_x = 0; dec_part_y = 0; dec_part_w4 = 2; dec_part_h4 = 2;
    dec_mvd = '0; dec_nmv_a = '0; dec_nmv_b = '0; dec_nmv_c = '0; dec_nmv_d = '0;
    dec_nref_a = 0; dec_nref_b = 0; dec_nref_c = 0; dec_nref_d = 0; dec_cur_ref = 0;
    dec_navail_a = 1; dec_navail_b = 1; dec_navail_c = 1; dec_navail_d = 1; dec_part_shape = 0;
    dec_frame_w = 12'(FW); dec_frame_h = 12'(FH);
    repeat (3) @(negedge clk); rst_n = 1;

    // ======== encoder: one frame through the four-stage pipeline
    @(negedge clk); enc_frame_start = 1;
    @(negedge clk); enc_frame_start = 0;
    fork
      begin
        while (!enc_frame_done) @(negedge clk);
      end
      begin
        // ======== decoder, in parallel with the encoder
        // Exp-Golomb
        for (int v = 0; v < 20; v++) begin
          int k, n, l;
          k = v * 37 % 300; n = 0;
          while ((k + 1) >= (1 << (n + 1))) n++;
          l = 2*n + 1;
          @(negedge clk);
          dec_eg_bits = 32'(longint'(k + 1) << (32 - l)); dec_eg_signed = 0; dec_eg_in_valid = 1;
          @(negedge clk); dec_eg_in_valid = 0;
          checks++;
          if (!dec_eg_out_valid || int'(dec_eg_value) != k || int'(dec_eg_len) != l) failures++;
        end
        // inter MB at (16,16): four 8x8 partitions
        for (int p = 0; p < 4; p++) begin
          int ax, ay, bx2, by2, cx, cy, mx, my, px, py;
          ax = $urandom_range(0, 40) - 20; ay = $urandom_range(0, 40) - 20;
          bx2 = $urandom_range(0, 40) - 20; by2 = $urandom_range(0, 40) - 20;
          cx = $urandom_range(0, 40) - 20; cy = $urandom_range(0, 40) - 20;
          @(negedge clk);
          dec_nmv_a.x = 16'(ax); dec_nmv_a.y = 16'(ay); dec_nmv_b.x = 16'(bx2); dec_nmv_b.y = 16'(by2);
          dec_nmv_c.x = 16'(cx); dec_nmv_c.y = 16'(cy);
          px = med(ax, bx2, cx); py = med(ay, by2, cy);
          dec_mvd.x = 16'($urandom_range(0, 20) - 10); dec_mvd.y = 16'($urandom_range(0, 20) - 10);
          mx = px + int'(dec_mvd.x); my = py + int'(dec_mvd.y);
          if ((mx & 3) != 0 || (my & 3) != 0) n_frac_part++;
          dec_part_x = 12'(16 + 8*(p % 2)); dec_part_y = 12'(16 + 8*(p / 2));
          dec_part_w4 = 2; dec_part_h4 = 2; dec_inter_start = 1;
          @(negedge clk); dec_inter_start = 0;
          checks++;
          if (int'(dec_inter_mv.x) != mx || int'(dec_inter_mv.y) != my) failures++;
          while (!dec_inter_done) @(negedge clk);
          // residual blocks of this partition
          for (int b = 0; b < 4; b++) begin
            int x4, y4, got[4][4], rr[4][4];
            x4 = 2*(p % 2) + b % 2; y4 = 2*(p / 2) + b / 2;
            dec_block(x4, y4, 0, 0, 0, 0, got);
            iqit(lev, qp_cur, rr);
            n_inter_blk++;
            for (int y = 0; y < 4; y++)
              for (int x = 0; x < 4; x++) begin
                int e;
                e = clp(qsample(4*(16 + 4*x4 + x) + mx, 4*(16 + 4*y4 + y) + my) + rr[y][x]);
                checks++;
                if (got[y][x] != e) begin
                  failures++; $display("FAIL dec inter blk (%0d,%0d) px (%0d,%0d): %0d exp %0d", x4, y4, x, y, got[y][x], e);
                end
              end
          end
        end
        // intra 4x4 blocks, every mode
        for (int b = 0; b < 18; b++) begin
          int t[8], l[4], m, mode, got[4][4], rr[4][4], pa, pb;
          mode = b % 9;
          for (int i = 0; i < 8; i++) begin t[i] = $urandom_range(0, 255); dec_nb_top[i] = pixel_t'(t[i]); end
          for (int i = 0; i < 4; i++) begin l[i] = $urandom_range(0, 255); dec_nb_left[i] = pixel_t'(l[i]); end
          m = $urandom_range(0, 255); dec_nb_ul = pixel_t'(m);
          pa = $urandom_range(0, 8); pb = $urandom_range(0, 8);
          dec_block(b % 4, (b / 4) % 4, 1, mode, pa, pb, got);
          iqit(lev, qp_cur, rr);
          n_intra_blk++; n_mode[mode]++;
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              int e;
              e = clp(i4pred(mode, x, y, t, l, m, 1'b1, 1'b1) + rr[y][x]);
              checks++;
              if (got[y][x] != e) begin
                failures++; $display("FAIL dec intra mode %0d px (%0d,%0d): %0d exp %0d", mode, x, y, got[y][x], e);
              end
            end
        end
      end
    join
    // ======== totals and mechanisms
    checks++;
    if (int'(enc_sw_loaded) != MBH * (COLS-1) * ROWS + (NMB - MBH) * 16 * ROWS) begin
      failures++; $display("FAIL window pixels loaded %0d", enc_sw_loaded);
    end
    checks++; if (n_ip_rows != 64 * NMB) begin failures++; $display("FAIL IP rows %0d", n_ip_rows); end
    n_wait = int'(enc_wait_cycles);
    $display("mechanisms: pipeline wait cycles %0d, whole window loads %0d, partial loads %0d, local bus stalls %0d, MVPs from row above %0d",
             n_wait, n_full_load, n_part_load, n_loc_stall, n_mvp_up);
    $display("mechanisms: inter blocks %0d, intra blocks %0d, fractional-MV partitions %0d", n_inter_blk, n_intra_blk, n_frac_part);
    for (int i = 0; i < 9; i++) begin checks++; if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end end
    foreach (n_mode[i]) ;
    checks++; if (n_wait == 0) begin failures++; $display("FAIL no pipeline wait"); end
    checks++; if (n_full_load == 0 || n_part_load == 0) begin failures++; $display("FAIL load kinds"); end
    checks++; if (n_loc_stall == 0) begin failures++; $display("FAIL no bus stall"); end
    checks++; if (n_mvp_up == 0) begin failures++; $display("FAIL no MVP from above"); end
    checks++; if (n_frac_part == 0 || n_inter_blk == 0 || n_intra_blk == 0) begin failures++; $display("FAIL decoder paths"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WDOG; i++) @(posedge clk);
    failures++;
    $display("FAIL watchdog: enc frame_done %0d busy %0d last FME MB %0d, dec inter busy %0d blk ready %0d",
             enc_frame_done, enc_busy, enc_fme_mb, dec_inter_busy, dec_blk_ready);
    $display("  loaded %0d ip rows %0d full %0d part %0d inter %0d intra %0d", enc_sw_loaded, n_ip_rows, n_full_load, n_part_load, n_inter_blk, n_intra_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
