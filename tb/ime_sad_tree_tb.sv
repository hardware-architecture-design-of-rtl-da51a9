// ime_sad_tree_tb: checks the 41 variable-block-size SADs of ime_sad_tree, both in the
// default configuration (5-bit truncated pixels, checkerboard half subsampling) and with
// full 8-bit pixels and no subsampling. Each reference SAD is summed directly over the
// pixels of its block, so the VBS tree's merging is checked against a flat sum. The
// result must appear exactly one cycle after in_valid.
module ime_sad_tree_tb;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid;
  pixel_t cur[16][16], rb[16][16];
  logic ov_a, ov_b;
  logic [SAD_W-1:0] sad_a[NUM_VBS], sad_b[NUM_VBS];
  int checks = 0, failures = 0;

  ime_sad_tree dut_a (.clk, .rst_n, .in_valid, .cur, .ref_blk(rb), .out_valid(ov_a), .sad(sad_a));
  ime_sad_tree #(.PIX_BITS(8), .SUBSAMPLE(1'b0)) dut_b (.clk, .rst_n, .in_valid, .cur, .ref_blk(rb),
                                                       .out_valid(ov_b), .sad(sad_b));

  // block geometry of VBS index i: x0, y0 (pixels), w, h
  function automatic void geom(input int i, output int x0, output int y0, output int w, output int h);
    if (i < 16)      begin w = 4;  h = 4;  x0 = 4*(i % 4);        y0 = 4*(i / 4); end
    else if (i < 24) begin w = 8;  h = 4;  x0 = 8*((i-16) % 2);   y0 = 4*((i-16) / 2); end
    else if (i < 32) begin w = 4;  h = 8;  x0 = 4*((i-24) % 4);   y0 = 8*((i-24) / 4); end
    else if (i < 36) begin w = 8;  h = 8;  x0 = 8*((i-32) % 2);   y0 = 8*((i-32) / 2); end
    else if (i < 38) begin w = 16; h = 8;  x0 = 0;                y0 = 8*(i-36); end
    else if (i < 40) begin w = 8;  h = 16; x0 = 8*(i-38);         y0 = 0; end
    else             begin w = 16; h = 16; x0 = 0;                y0 = 0; end
  endfunction

  function automatic int ref_sad(input int i, input int sh, input bit sub);
    int x0, y0, w, h, s;
    geom(i, x0, y0, w, h);
    s = 0;
    for (int y = y0; y < y0 + h; y++)
      for (int x = x0; x < x0 + w; x++)
        if (!sub || ((x + y) % 2 == 0)) begin
          int a, b;
          a = int'(cur[y][x]) >> sh; b = int'(rb[y][x]) >> sh;
          s += (a > b) ? a - b : b - a;
        end
    return s;
  endfunction

  initial begin
    in_valid = 0;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin cur[y][x] = 0; rb[y][x] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int ea[NUM_VBS], eb[NUM_VBS];
      @(negedge clk);
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          cur[y][x] = pixel_t'($urandom);
          rb[y][x]  = (t % 4 == 0) ? 8'hff - cur[y][x] : pixel_t'($urandom);
        end
      for (int i = 0; i < NUM_VBS; i++) begin ea[i] = ref_sad(i, 3, 1); eb[i] = ref_sad(i, 0, 0); end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++; if (!ov_a || !ov_b) failures++;
      for (int i = 0; i < NUM_VBS; i++) begin
        checks += 2;
        if (int'(sad_a[i]) != ea[i]) begin failures++; $display("FAIL sub sad[%0d] %0d exp %0d", i, sad_a[i], ea[i]); end
        if (int'(sad_b[i]) != eb[i]) begin failures++; $display("FAIL full sad[%0d] %0d exp %0d", i, sad_b[i], eb[i]); end
      end
      @(negedge clk);
      checks++; if (ov_a) failures++;
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
