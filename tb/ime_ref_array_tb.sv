// ime_ref_array_tb: pushes random rows into ime_ref_array and checks that candidate k
// always shows the 16x16 block made of the last 16 rows pushed (newest at the top row),
// starting at horizontal offset k, and that nothing moves without shift.
module ime_ref_array_tb;
  import h264_pkg::*;
  localparam int NC = 8, W = NC + 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift;
  pixel_t row_in[W], cand[NC][16][16];
  pixel_t hist[$][W];
  int checks = 0, failures = 0;

  ime_ref_array dut (.clk, .rst_n, .shift, .row_in, .cand);

  initial begin
    shift = 0;
    for (int i = 0; i < W; i++) row_in[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      pixel_t r[W];
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < W; i++) begin r[i] = pixel_t'($urandom); row_in[i] = r[i]; end
      if (shift) hist.push_front(r);
      @(negedge clk);
      shift = 0;
      if (hist.size() >= 16)
        for (int k = 0; k < NC; k++)
          for (int y = 0; y < 16; y++)
            for (int x = 0; x < 16; x++) begin
              checks++;
              if (cand[k][y][x] != hist[y][k + x]) begin
                failures++;
                if (failures < 10) $display("FAIL cand %0d (%0d,%0d)", k, x, y);
              end
            end
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
