// ime_engine: low-bandwidth parallel integer motion estimation (IME) for one macroblock
// (MB) against one reference frame, with full search and variable block sizes.
//
// Data path. The current MB sits in a 16x16 register (Cur. MB Reg.). The search window
// is held in ime_sw_mem, filled by ime_sw_loader from the local bus (first MB of a row:
// whole window; later MBs: 16 new columns). Each cycle one SRAM row of NCAND+15 pixels
// is pushed into the reference register array (ime_ref_array), which presents NCAND
// horizontally adjacent candidates to NCAND PE-array SAD trees (ime_sad_tree); each tree
// produces the 41 VBS SADs of its candidate. ime_mv_cost adds the rate term from the
// modified predictor (median of the MVs of the upper-left, upper and upper-right MBs,
// read from the Upper Ref. & MV SRAM), and ime_cmp_tree keeps the best cost and MV of
// all 41 blocks. At the end, the 41 MVs go to the Integer MV Buffer, one set per
// reference frame. All of this follows the document's block diagram of the IME.
//
// Schedule (this design's choice, consistent with the downward-shifting array): the
// horizontal range is cut into groups of NCAND candidates; for each group, rows are
// pushed from the bottom of the range upward, so after 16 pushes the first vertical
// position is complete and every further push completes the next one. A search with
// ranges [-sr_h, sr_h-1] x [-sr_v, sr_v-1] takes (2*sr_h/NCAND)*(2*sr_v+15) push cycles
// plus 5 cycles of pipeline and hand-over. sr_h must be a multiple of NCAND and at most
// SRH; sr_v at most SRV. Defaults: the document's eight candidates, 5-bit truncation,
// half sub-sampling and the Ref. 0 search range H[-64,+63] V[-32,+31].
//
// Interface: load the current MB with cur_we/cur_row/cur_data (one row per cycle). Pulse
// start with the other job inputs held; busy stays high until done pulses. The job
// first loads the window through ext_* (see ime_sw_loader), then searches. best_mv (in
// whole pixels) and best_cost hold the result after done; int_mv[ref] keeps the 41 MVs of
// each reference frame. upd_* writes the two bottom MVs (quarter pixels) of an MB of the
// current row into the Upper Ref. & MV SRAM, used when the next row is searched.
module ime_engine
  import h264_pkg::*;
#(
  parameter int NCAND     = 8,
  parameter int SRH       = 64,
  parameter int SRV       = 32,
  parameter int PIX_BITS  = 5,
  parameter bit SUBSAMPLE = 1'b1,
  parameter int NUM_REF   = 4,
  parameter int MAX_MB_W  = 80,
  localparam int COLS = 2 * SRH + 16,
  localparam int ROWS = 2 * SRV + 15,
  localparam int CW   = $clog2(COLS),
  localparam int RW   = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // current MB register load
  input  logic              cur_we,
  input  logic [3:0]        cur_row,
  input  pixel_t            cur_data [16],
  // job
  input  logic              start,
  input  logic [7:0]        mb_x,
  input  logic [7:0]        mb_y,
  input  logic [11:0]       frame_w,
  input  logic [11:0]       frame_h,
  input  logic [7:0]        sr_h,
  input  logic [7:0]        sr_v,
  input  logic [1:0]        ref_idx,
  input  logic [7:0]        lambda,
  output logic              busy,
  output logic              done,
  // local bus read port for the search window
  output logic              ext_req,
  output logic [11:0]       ext_x,
  output logic [11:0]       ext_y,
  input  logic              ext_ready,
  input  pixel_t            ext_rdata,
  // Upper Ref. & MV SRAM update (from the IP stage)
  input  logic              upd_we,
  input  logic [7:0]        upd_mbx,
  input  mv_t               upd_mv_left,
  input  mv_t               upd_mv_right,
  // results
  output mv_t               best_mv   [NUM_VBS],
  output logic [COST_W-1:0] best_cost [NUM_VBS],
  output mv_t               int_mv    [NUM_REF][NUM_VBS],
  output logic [31:0]       sw_loaded
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SEARCH, S_DRAIN, S_STORE} state_e;
  state_e state;

  // ---------------- current MB register
  pixel_t cur_mb [16][16];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) cur_mb[r][c] <= '0;
    end else if (cur_we) begin
      cur_mb[cur_row] <= cur_data;
    end
  end

  // ---------------- Upper Ref. & MV SRAM and RefMV buffer
  mv_t up_left [MAX_MB_W];
  mv_t up_right[MAX_MB_W];
  mv_t mv0_q, mv1_q, mv2_q;
  always_ff @(posedge clk) begin
    if (upd_we) begin
      up_left[upd_mbx]  <= upd_mv_left;
      up_right[upd_mbx] <= upd_mv_right;
    end
  end

  // ---------------- search window memory and loader
  logic          ld_start, ld_busy, ld_done;
  logic          sw_we;
  logic [RW-1:0] sw_wrow;
  logic [CW-1:0] sw_wcol;
  pixel_t        sw_wdata;
  logic          sw_re;
  logic [RW-1:0] sw_rrow;
  logic [CW-1:0] sw_rcol;
  pixel_t        sw_rdata [NCAND+15];

  ime_sw_loader #(.SRH(SRH), .SRV(SRV)) u_loader (
    .clk, .rst_n, .start(ld_start), .mb_x, .mb_y, .frame_w, .frame_h,
    .busy(ld_busy), .done(ld_done),
    .ext_req, .ext_x, .ext_y, .ext_ready, .ext_rdata,
    .sw_we, .sw_row(sw_wrow), .sw_col(sw_wcol), .sw_wdata, .loaded(sw_loaded)
  );

  ime_sw_mem #(.SRH(SRH), .SRV(SRV), .RD_W(NCAND+15)) u_swmem (
    .clk, .we(sw_we), .wrow(sw_wrow), .wcol(sw_wcol), .wdata(sw_wdata),
    .re(sw_re), .rrow(sw_rrow), .rcol(sw_rcol), .rdata(sw_rdata)
  );

  // ---------------- search control
  logic [7:0]  grp, ngrp;
  logic [7:0]  push, npush;
  logic [2:0]  drain;
  logic [7:0]  sr_h_q, sr_v_q;
  logic [7:0]  mbx_q, mby_q;
  logic [1:0]  ref_q;
  logic [7:0]  lambda_q;

  // candidate tag carried along the pipeline: valid, dx of candidate 0, dy
  typedef struct packed {
    logic              v;
    logic signed [15:0] dx;
    logic signed [15:0] dy;
  } tag_t;
  tag_t tag0, tag1, tag2, tag3;
  logic shift1;

  logic signed [15:0] x_left;   // frame x of the group's first candidate column
  always_comb begin
    x_left = $signed({4'd0, mbx_q, 4'd0}) - $signed({8'd0, sr_h_q})
           + $signed(16'(int'(grp) * NCAND));
    sw_re   = (state == S_SEARCH);
    sw_rrow = RW'(SRV + int'(sr_v_q) + 14 - int'(push));
    sw_rcol = CW'((int'(x_left) + 4 * COLS) % COLS);
    tag0.v  = (state == S_SEARCH) && (push >= 8'd15);
    tag0.dx = x_left - $signed({4'd0, mbx_q, 4'd0});
    tag0.dy = 16'(int'(sr_v_q) + 14 - int'(push));
  end

  assign ld_start = start && (state == S_IDLE);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0;
      grp <= '0; ngrp <= '0; push <= '0; npush <= '0; drain <= '0;
      sr_h_q <= '0; sr_v_q <= '0; mbx_q <= '0; mby_q <= '0; ref_q <= '0; lambda_q <= '0;
      mv0_q <= '0; mv1_q <= '0; mv2_q <= '0;
      tag1 <= '0; tag2 <= '0; tag3 <= '0; shift1 <= 1'b0;
    end else begin
      done   <= 1'b0;
      shift1 <= sw_re;
      tag1   <= tag0;
      tag2   <= tag1;
      tag3   <= tag2;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_LOAD;
          sr_h_q   <= sr_h;   sr_v_q <= sr_v;
          mbx_q    <= mb_x;   mby_q  <= mb_y;
          ref_q    <= ref_idx; lambda_q <= lambda;
          ngrp     <= 8'((2 * int'(sr_h)) / NCAND);
          npush    <= 8'(2 * int'(sr_v) + 15);
          grp      <= '0; push <= '0;
          // RefMV buffer: MVs of the upper-left, upper and upper-right MBs
          mv0_q <= (mb_y != 0 && mb_x != 0) ? up_right[mb_x - 8'd1] : '0;
          mv1_q <= (mb_y != 0) ? up_left[mb_x] : '0;
          mv2_q <= (mb_y != 0 && (int'(mb_x) + 1) * 16 < int'(frame_w)) ? up_left[mb_x + 8'd1] : '0;
        end
        S_LOAD: if (ld_done) state <= S_SEARCH;
        S_SEARCH: begin
          if (push == npush - 8'd1) begin
            push <= '0;
            if (grp == ngrp - 8'd1) begin
              state <= S_DRAIN;
              drain <= '0;
            end else grp <= grp + 8'd1;
          end else push <= push + 8'd1;
        end
        S_DRAIN: begin
          drain <= drain + 3'd1;
          if (drain == 3'd3) state <= S_STORE;
        end
        S_STORE: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- reference array, SAD trees, MV cost, comparators
  pixel_t cand [NCAND][16][16];
  ime_ref_array #(.NCAND(NCAND)) u_refarr (
    .clk, .rst_n, .shift(shift1), .row_in(sw_rdata), .cand
  );

  logic [SAD_W-1:0] sad [NCAND][NUM_VBS];
  logic [NCAND-1:0] sad_v;
  for (genvar k = 0; k < NCAND; k++) begin : g_pe
    ime_sad_tree #(.PIX_BITS(PIX_BITS), .SUBSAMPLE(SUBSAMPLE)) u_tree (
      .clk, .rst_n, .in_valid(tag2.v), .cur(cur_mb), .ref_blk(cand[k]),
      .out_valid(sad_v[k]), .sad(sad[k])
    );
  end

  mv_t               cand_mv [NCAND];
  logic [COST_W-1:0] mv_cost [NCAND];
  mv_t               mvp;
  always_comb begin
    for (int k = 0; k < NCAND; k++) begin
      cand_mv[k].x = tag3.dx + 16'(k);
      cand_mv[k].y = tag3.dy;
    end
  end

  ime_mv_cost #(.NCAND(NCAND)) u_cost (
    .mv0(mv0_q), .mv1(mv1_q), .mv2(mv2_q), .lambda(lambda_q),
    .cand_mv, .mvp, .cost(mv_cost)
  );

  ime_cmp_tree #(.NCAND(NCAND)) u_cmp (
    .clk, .rst_n, .clear(ld_start), .in_valid(tag3.v && sad_v[0]),
    .sad, .cost(mv_cost), .cand_mv, .best_cost, .best_mv
  );

  // ---------------- Integer MV buffer (41 MVs per reference frame)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REF; r++)
        for (int b = 0; b < NUM_VBS; b++) int_mv[r][b] <= '0;
    end else if (state == S_STORE) begin
      int_mv[ref_q] <= best_mv;
    end
  end

endmodule
