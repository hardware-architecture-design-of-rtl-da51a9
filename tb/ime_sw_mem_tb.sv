// ime_sw_mem_tb: fills the search-window SRAM (default size, 144 x 79 pixels) through its
// one-pixel write port and reads random 23-pixel row segments, including segments that
// wrap from the last column to the first. Data must appear one cycle after re and hold
// while re is low.
module ime_sw_mem_tb;
  import h264_pkg::*;
  localparam int SRH = 64, SRV = 32, RD_W = 23;
  localparam int COLS = 2*SRH + 16, ROWS = 2*SRV + 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [$clog2(ROWS)-1:0] wrow, rrow;
  logic [$clog2(COLS)-1:0] wcol, rcol;
  pixel_t wdata, rdata[RD_W];
  pixel_t model[ROWS][COLS];
  int checks = 0, failures = 0;

  ime_sw_mem dut (.clk, .we, .wrow, .wcol, .wdata, .re, .rrow, .rcol, .rdata);

  task automatic rd(input int r, input int c);
    pixel_t e[RD_W];
    @(negedge clk);
    we = 0; re = 1; rrow = $bits(rrow)'(r); rcol = $bits(rcol)'(c);
    for (int i = 0; i < RD_W; i++) e[i] = model[r][(c + i) % COLS];
    @(negedge clk);
    re = 0;
    for (int i = 0; i < RD_W; i++) begin
      checks++;
      if (rdata[i] != e[i]) begin failures++; if (failures < 10) $display("FAIL r %0d c %0d i %0d", r, c, i); end
    end
    rrow = 0; rcol = 0;
    @(negedge clk);
    for (int i = 0; i < RD_W; i++) begin checks++; if (rdata[i] != e[i]) failures++; end
  endtask

  initial begin
    we = 0; re = 0; wrow = 0; wcol = 0; wdata = 0; rrow = 0; rcol = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        model[r][c] = pixel_t'($urandom);
        we = 1; wrow = $bits(wrow)'(r); wcol = $bits(wcol)'(c); wdata = model[r][c];
      end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      // overwrite a few pixels now and then
      if (t % 3 == 0) begin
        int r, c;
        r = $urandom_range(0, ROWS-1); c = $urandom_range(0, COLS-1);
        @(negedge clk);
        model[r][c] = pixel_t'($urandom);
        we = 1; wrow = $bits(wrow)'(r); wcol = $bits(wcol)'(c); wdata = model[r][c];
      end
      rd($urandom_range(0, ROWS-1), (t % 5 == 0) ? COLS - $urandom_range(1, RD_W) : $urandom_range(0, COLS-1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
