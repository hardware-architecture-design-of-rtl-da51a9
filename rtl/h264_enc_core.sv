// h264_enc_core: the encoder's four-stage macroblock (MB) pipeline.
//
// Five tasks of H.264 encoding are mapped onto four MB stages that run on four
// consecutive MBs at once (mb_pipe_ctrl):
//   stage 1  IME   integer motion estimation (ime_engine), built here;
//   stage 2  FME   fractional motion estimation with luma MC, outside this core: the
//                  core starts it and hands it the 41 integer MVs and costs of its MB;
//   stage 3  IP    intra prediction with the reconstruction loop; the core runs the
//                  reconfigurable intra predictor generator (intra_pred_gen) for the
//                  16x16 luma mode given on ip_mode and streams the predictors out; the
//                  transform/quantisation loop and mode decision are outside; at the end
//                  of the stage the MB's final bottom MVs update the IME's Upper Ref. &
//                  MV SRAM;
//   stage 4  EC/DB entropy coding and deblocking, outside this core (start/done only).
// The IME stage first reads the current MB from the system bus (16 rows, one per
// cycle) into the Cur. MB register, then runs the search; its reference pixels come
// from the local bus. MBs are coded in raster order; each stage keeps its own MB
// column/row counters. The stage assignment and the data hand-over between stages
// follow the document's system diagram; the handshakes, the one-reference-frame IME
// and the partial IP stage are this design's.
//
// Interface: frame_start with frame_w/frame_h (multiples of 16), sr_h/sr_v and lambda
// held for the frame; frame_done pulses at the end. sys_*: read of 16 current-MB pixels,
// data one cycle after sys_req. loc_*: reference-pixel reads (see ime_sw_loader).
// fme_*/ip_*/ecdb_*: start pulses with the stage's MB index and done pulses back.
module h264_enc_core
  import h264_pkg::*;
#(
  parameter int NCAND     = 8,
  parameter int SRH       = 64,
  parameter int SRV       = 32,
  parameter int PIX_BITS  = 5,
  parameter bit SUBSAMPLE = 1'b1,
  parameter int MAX_MB_W  = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic [11:0]       frame_w,
  input  logic [11:0]       frame_h,
  input  logic [7:0]        sr_h,
  input  logic [7:0]        sr_v,
  input  logic [7:0]        lambda,
  output logic              busy,
  output logic              frame_done,
  output logic [31:0]       wait_cycles,
  // system bus: current MB rows
  output logic              sys_req,
  output logic [11:0]       sys_x,
  output logic [11:0]       sys_y,
  input  pixel_t            sys_rdata [16],
  // local bus: reference frame pixels
  output logic              loc_req,
  output logic [11:0]       loc_x,
  output logic [11:0]       loc_y,
  input  logic              loc_ready,
  input  pixel_t            loc_rdata,
  // stage 2: FME
  output logic              fme_start,
  output logic [15:0]       fme_mb,
  output mv_t               fme_imv   [NUM_VBS],
  output logic [COST_W-1:0] fme_icost [NUM_VBS],
  input  logic              fme_done,
  // stage 3: IP
  output logic              ip_start,
  output logic [15:0]       ip_mb,
  input  logic [3:0]        ip_mode,
  input  pixel_t            ip_top  [16],
  input  pixel_t            ip_left [16],
  input  pixel_t            ip_ul,
  input  logic              ip_avail_top,
  input  logic              ip_avail_left,
  output logic              ip_pred_valid,
  output logic [3:0]        ip_pred_y,
  output logic [1:0]        ip_pred_xq,
  output pixel_t            ip_pred [4],
  input  mv_t               ip_mv_left,
  input  mv_t               ip_mv_right,
  // stage 4: EC / DB
  output logic              ecdb_start,
  output logic [15:0]       ecdb_mb,
  input  logic              ecdb_done,
  output logic [31:0]       sw_loaded
);

  logic [3:0]  st_start, st_act, st_done;
  logic [15:0] st_mb [4];
  logic [15:0] slot;
  logic [15:0] num_mb;
  logic [7:0]  mbw;
  logic        ime_done, ip_gen_done;

  assign mbw    = frame_w[11:4];
  assign num_mb = 16'(int'(frame_w[11:4]) * int'(frame_h[11:4]));

  mb_pipe_ctrl #(.NSTAGE(4)) u_ctrl (
    .clk, .rst_n, .frame_start, .num_mb, .stage_done(st_done), .stage_start(st_start),
    .stage_act(st_act), .stage_mb(st_mb), .busy, .frame_done, .slot, .wait_cycles
  );

  // ---------------- per-stage raster position counters
  logic [7:0] ime_mbx, ime_mby, ip_mbx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ime_mbx <= '0; ime_mby <= '0; ip_mbx <= '0;
    end else if (frame_start && !busy) begin
      ime_mbx <= '0; ime_mby <= '0; ip_mbx <= '0;
    end else begin
      if (ime_done) begin
        if (ime_mbx == mbw - 8'd1) begin ime_mbx <= '0; ime_mby <= ime_mby + 8'd1; end
        else ime_mbx <= ime_mbx + 8'd1;
      end
      if (ip_gen_done) ip_mbx <= (ip_mbx == mbw - 8'd1) ? 8'd0 : ip_mbx + 8'd1;
    end
  end

  // ---------------- stage 1: current MB load, then IME
  logic       cur_loading, cur_we, ime_go, ime_busy;
  logic [4:0] cur_cnt;
  logic [3:0] cur_row;
  pixel_t     cur_data [16];
  mv_t               best_mv   [NUM_VBS];
  logic [COST_W-1:0] best_cost [NUM_VBS];
  mv_t               int_mv    [1][NUM_VBS];

  assign sys_req = cur_loading && (cur_cnt < 5'd16);
  assign sys_x   = {ime_mbx, 4'd0};
  assign sys_y   = {ime_mby, 4'd0} + 12'(cur_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_loading <= 1'b0; cur_cnt <= '0; cur_we <= 1'b0; cur_row <= '0; ime_go <= 1'b0;
      for (int i = 0; i < 16; i++) cur_data[i] <= '0;
    end else begin
      cur_we <= 1'b0;
      ime_go <= 1'b0;
      if (st_start[0]) begin
        cur_loading <= 1'b1; cur_cnt <= '0;
      end else if (cur_loading) begin
        cur_cnt <= cur_cnt + 5'd1;
        if (cur_cnt != 0) begin
          cur_we   <= 1'b1;
          cur_row  <= 4'(cur_cnt - 5'd1);
          cur_data <= sys_rdata;
        end
        if (cur_cnt == 5'd16) begin
          cur_loading <= 1'b0;
          ime_go      <= 1'b1;   // starts one cycle after the last row is written
        end
      end
    end
  end

  ime_engine #(.NCAND(NCAND), .SRH(SRH), .SRV(SRV), .PIX_BITS(PIX_BITS),
               .SUBSAMPLE(SUBSAMPLE), .NUM_REF(1), .MAX_MB_W(MAX_MB_W)) u_ime (
    .clk, .rst_n, .cur_we, .cur_row, .cur_data,
    .start(ime_go), .mb_x(ime_mbx), .mb_y(ime_mby), .frame_w, .frame_h, .sr_h, .sr_v,
    .ref_idx(2'd0), .lambda, .busy(ime_busy), .done(ime_done),
    .ext_req(loc_req), .ext_x(loc_x), .ext_y(loc_y), .ext_ready(loc_ready), .ext_rdata(loc_rdata),
    .upd_we(ip_gen_done), .upd_mbx(ip_mbx), .upd_mv_left(ip_mv_left), .upd_mv_right(ip_mv_right),
    .best_mv, .best_cost, .int_mv, .sw_loaded
  );

  // ---------------- stage 2: hand the integer MVs to the FME
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_VBS; b++) begin fme_imv[b] <= '0; fme_icost[b] <= '0; end
    end else if (st_start[1]) begin
      fme_imv   <= int_mv[0];
      fme_icost <= best_cost;
    end
  end
  logic fme_go;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fme_go <= 1'b0;
    else        fme_go <= st_start[1];
  end
  assign fme_start = fme_go;
  assign fme_mb    = st_mb[1];

  // ---------------- stage 3: intra predictor generator
  logic ip_gen_busy;
  logic [1:0] ip_unused;
  assign ip_start = st_start[2];
  assign ip_mb    = st_mb[2];
  intra_pred_gen u_ipg (
    .clk, .rst_n, .start(st_start[2]), .blk(IP_I16), .mode(ip_mode),
    .avail_top(ip_avail_top), .avail_left(ip_avail_left), .avail_tr(1'b0),
    .top(ip_top), .left(ip_left), .ul(ip_ul), .busy(ip_gen_busy),
    .out_valid(ip_pred_valid), .out_y(ip_pred_y), .out_xq(ip_pred_xq), .pred(ip_pred),
    .done(ip_gen_done)
  );
  assign ip_unused = {ip_gen_busy, ime_busy};

  // ---------------- stage 4
  assign ecdb_start = st_start[3];
  assign ecdb_mb    = st_mb[3];

  assign st_done = {ecdb_done, ip_gen_done, fme_done, ime_done};

endmodule
