// iqit_engine: inverse quantisation and inverse 4x4 integer transform of one residual
// block per cycle, for the decoder's 4x4-block pipeline.
//
// The 16 levels arrive in zig-zag scan order as the entropy decoder produces them. They
// are placed back in raster order and scaled with the flat H.264 rule
// d = c * v(qp%6, position class) << (qp/6), where the class is 0 for positions with
// both coordinates even, 1 for both odd and 2 otherwise. The inverse core transform is
// applied to rows and then columns with the standard butterflies (the odd inputs halved
// by a shift), and the result is rounded with (x + 32) >> 6. The document names this
// engine only; the arithmetic is the H.264 standard's. The separate DC path of
// Intra16x16 and chroma blocks (Hadamard) is not included. Interface: in_valid with
// coef and qp; res is registered and valid (out_valid) one cycle later.
module iqit_engine
  import h264_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] coef [16],
  input  logic [5:0]         qp,
  output logic               out_valid,
  output logic signed [15:0] res  [4][4]
);

  localparam int ZZ [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
  localparam int V  [6][3] = '{'{10, 13, 16}, '{11, 14, 18}, '{13, 16, 20},
                               '{14, 18, 23}, '{16, 20, 25}, '{18, 23, 29}};

  logic signed [15:0] res_c [4][4];

  always_comb begin
    int d [4][4];
    int t [4][4];
    int qm, qd;
    qd = int'(qp) / 6;
    qm = int'(qp) % 6;
    // inverse scan and scaling
    for (int i = 0; i < 16; i++) begin
      int r, c, cls;
      r = ZZ[i] / 4; c = ZZ[i] % 4;
      cls = ((r % 2) == 0 && (c % 2) == 0) ? 0 : (((r % 2) == 1 && (c % 2) == 1) ? 1 : 2);
      d[r][c] = (int'(coef[i]) * V[qm][cls]) <<< qd;
    end
    // horizontal (rows)
    for (int r = 0; r < 4; r++) begin
      int e0, e1, e2, e3;
      e0 = d[r][0] + d[r][2];
      e1 = d[r][0] - d[r][2];
      e2 = (d[r][1] >>> 1) - d[r][3];
      e3 = d[r][1] + (d[r][3] >>> 1);
      t[r][0] = e0 + e3; t[r][1] = e1 + e2; t[r][2] = e1 - e2; t[r][3] = e0 - e3;
    end
    // vertical (columns) and rounding
    for (int c = 0; c < 4; c++) begin
      int g0, g1, g2, g3;
      g0 = t[0][c] + t[2][c];
      g1 = t[0][c] - t[2][c];
      g2 = (t[1][c] >>> 1) - t[3][c];
      g3 = t[1][c] + (t[3][c] >>> 1);
      res_c[0][c] = 16'((g0 + g3 + 32) >>> 6);
      res_c[1][c] = 16'((g1 + g2 + 32) >>> 6);
      res_c[2][c] = 16'((g1 - g2 + 32) >>> 6);
      res_c[3][c] = 16'((g0 - g3 + 32) >>> 6);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) res[r][c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) res <= res_c;
    end
  end

endmodule
