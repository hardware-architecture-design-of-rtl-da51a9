// iqit_engine_tb: random level blocks at random QPs through iqit_engine, compared with a
// reference that inverse-scans, scales and applies the H.264 inverse transform equations
// written out per output, plus the one-cycle latency.
module iqit_engine_tb;
  import h264_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid; logic signed [15:0] coef[16]; logic [5:0] qp;
  logic signed [15:0] res[4][4];
  iqit_engine dut (.*);
  int checks = 0, failures = 0;

  int scan [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
  int vt [6][3] = '{'{10, 13, 16}, '{11, 14, 18}, '{13, 16, 20}, '{14, 18, 23}, '{16, 20, 25}, '{18, 23, 29}};

  function automatic void tr1(input int a0, input int a1, input int a2, input int a3,
                              output int o0, output int o1, output int o2, output int o3);
    o0 = a0 + a2 + a1 + (a3 >>> 1);
    o1 = a0 - a2 + (a1 >>> 1) - a3;
    o2 = a0 - a2 - (a1 >>> 1) + a3;
    o3 = a0 + a2 - a1 - (a3 >>> 1);
  endfunction

  initial begin
    in_valid = 0; qp = 0; for (int i = 0; i < 16; i++) coef[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int d[4][4], h[4][4], o[4][4], q;
      q = $urandom_range(0, 51);
      for (int i = 0; i < 16; i++) begin
        coef[i] = ($urandom_range(0, 2) == 0) ? 16'(int'($urandom_range(0, 40)) - 20) : 16'sd0;
        if (q > 36) coef[i] = coef[i] / 4;
      end
      qp = 6'(q); in_valid = 1;
      for (int i = 0; i < 16; i++) begin
        int r, c, k;
        r = scan[i] >> 2; c = scan[i] & 3;
        k = (r % 2 == 0 && c % 2 == 0) ? 0 : ((r % 2 == 1 && c % 2 == 1) ? 1 : 2);
        d[r][c] = int'(coef[i]) * vt[q % 6][k] * (1 << (q / 6));
      end
      for (int r = 0; r < 4; r++) tr1(d[r][0], d[r][1], d[r][2], d[r][3], h[r][0], h[r][1], h[r][2], h[r][3]);
      for (int c = 0; c < 4; c++) tr1(h[0][c], h[1][c], h[2][c], h[3][c], o[0][c], o[1][c], o[2][c], o[3][c]);
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid) failures++;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(res[r][c]) != ((o[r][c] + 32) >>> 6)) begin
            failures++;
            $display("FAIL qp %0d (%0d,%0d): got %0d exp %0d", q, r, c, res[r][c], (o[r][c] + 32) >>> 6);
          end
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
