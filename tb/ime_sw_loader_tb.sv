// ime_sw_loader_tb: runs ime_sw_loader (search range H[-16,+15], V[-8,+7]) along two MB
// rows of a 64x48 frame with a local bus that stalls at random. It checks the number of
// pixels fetched (the whole window minus one column for the first MB of a row, 16 new
// columns for the others), that every write lands at SRAM column x mod 48 of its row and
// carries the frame pixel at the clamped position (padding), and that after each load the
// window for that MB is complete in the SRAM model.
module ime_sw_loader_tb;
  import h264_pkg::*;
  localparam int SRH = 16, SRV = 8, COLS = 2*SRH + 16, ROWS = 2*SRV + 15;
  localparam int FW = 64, FH = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, ext_req, ext_ready, sw_we;
  logic [7:0] mb_x, mb_y;
  logic [11:0] frame_w, frame_h, ext_x, ext_y;
  pixel_t ext_rdata, sw_wdata;
  logic [$clog2(ROWS)-1:0] sw_row;
  logic [$clog2(COLS)-1:0] sw_col;
  logic [31:0] loaded;
  pixel_t frm[FH][FW];
  int sram[ROWS][COLS];
  int checks = 0, failures = 0, writes = 0, stalls = 0;

  ime_sw_loader #(.SRH(SRH), .SRV(SRV)) dut (.*);

  function automatic int pix(input int x, input int y);
    x = x < 0 ? 0 : (x >= FW ? FW - 1 : x);
    y = y < 0 ? 0 : (y >= FH ? FH - 1 : y);
    return int'(frm[y][x]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    ext_ready <= ($urandom_range(0, 2) != 0);
    if (ext_req && !ext_ready) stalls++;
    if (ext_req && ext_ready) begin
      ext_rdata <= frm[int'(ext_y) % FH][int'(ext_x) % FW];
      if (int'(ext_x) >= FW || int'(ext_y) >= FH) failures++;
    end
    if (sw_we) begin sram[sw_row][sw_col] = int'(sw_wdata); writes++; end
  end

  initial begin
    start = 0; ext_ready = 0; mb_x = 0; mb_y = 0; frame_w = 12'(FW); frame_h = 12'(FH); ext_rdata = 0;
    for (int y = 0; y < FH; y++) for (int x = 0; x < FW; x++) frm[y][x] = pixel_t'($urandom);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) sram[r][c] = -1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int my = 0; my < 2; my++)
      for (int mx = 0; mx < FW / 16; mx++) begin
        int w0, exp_n;
        @(negedge clk);
        mb_x = 8'(mx); mb_y = 8'(my); start = 1; w0 = writes;
        @(negedge clk); start = 0;
        while (!done) @(negedge clk);
        @(negedge clk);
        exp_n = (mx == 0 ? COLS - 1 : 16) * ROWS;
        checks++;
        if (writes - w0 != exp_n) begin failures++; $display("FAIL MB (%0d,%0d) %0d writes exp %0d", mx, my, writes - w0, exp_n); end
        // window for candidates x in [16mx-SRH, 16mx+SRH+15), rows y in [16my-SRV, 16my-SRV+ROWS)
        for (int r = 0; r < ROWS; r++)
          for (int x = 16*mx - SRH; x < 16*mx + SRH + 15; x++) begin
            checks++;
            if (sram[r][(x + 4*COLS) % COLS] != pix(x, 16*my - SRV + r)) begin
              failures++;
              if (failures < 10) $display("FAIL MB (%0d,%0d) window x %0d row %0d", mx, my, x, r);
            end
          end
      end
    checks++;
    if (int'(loaded) != writes) failures++;
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
