// sum_clip_tb: random predictions and residuals (including ones that overflow both ways)
// through sum_clip, checking the clipped sums and the one-cycle latency.
module sum_clip_tb;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid; pixel_t pred[4][4], rec[4][4]; logic signed [15:0] res[4][4];
  sum_clip dut (.*);
  int checks = 0, failures = 0;
  initial begin
    in_valid = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin pred[r][c] = 0; res[r][c] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        pred[r][c] = pixel_t'($urandom); res[r][c] = 16'(int'($urandom_range(0, 600)) - 300);
      end
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid) failures++;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        int s;
        s = int'(pred[r][c]) + int'(res[r][c]);
        s = s > 255 ? 255 : (s < 0 ? 0 : s);
        checks++;
        if (int'(rec[r][c]) != s) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
