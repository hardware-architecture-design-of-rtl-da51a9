// mc_ip_unit_tb: drives random 9x9 windows with all 16 quarter-pixel fractions into
// mc_ip_unit and compares the 4x4 prediction with the reference quarter-pixel samples of
// h264_tb_ref, and checks the one-cycle latency.
module mc_ip_unit_tb;
  import h264_pkg::*;
  import h264_tb_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid; logic [1:0] fx, fy;
  pixel_t win[9][9], pred[4][4];
  mc_ip_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    in_valid = 0; fx = 0; fy = 0;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) win[r][c] = 0;
    rf_w = 9; rf_h = 9;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++)
      for (int f = 0; f < 16; f++) begin
        for (int r = 0; r < 9; r++)
          for (int c = 0; c < 9; c++) begin
            win[r][c] = (t % 2) ? pixel_t'($urandom) : pixel_t'(8*c + 5*r + $urandom_range(0, 20));
            rf[r][c] = win[r][c];
          end
        fx = 2'(f % 4); fy = 2'(f / 4); in_valid = 1;
        @(negedge clk); in_valid = 0;
        checks++;
        if (!out_valid) failures++;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int e;
            e = qsample(4*(x+2) + int'(fx), 4*(y+2) + int'(fy));
            checks++;
            if (int'(pred[y][x]) != e) begin
              failures++;
              $display("FAIL frac (%0d,%0d) pixel (%0d,%0d): got %0d exp %0d", fx, fy, x, y, pred[y][x], e);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
