// intra_mode_pred_tb: exhaustive check of intra_mode_pred over neighbour availability,
// neighbour coding type, neighbour modes, prev_flag and rem_mode, against the rule
// written from the H.264 standard.
module intra_mode_pred_tb;
  logic avail_a, avail_b, is_i4_a, is_i4_b, prev_flag; logic [3:0] mode_a, mode_b, pred_mode, mode;
  logic [2:0] rem_mode;
  intra_mode_pred dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int f = 0; f < 16; f++)
      for (int ma = 0; ma < 9; ma++)
        for (int mb = 0; mb < 9; mb++)
          for (int pf = 0; pf < 2; pf++)
            for (int rm = 0; rm < 8; rm++) begin
              int p, e, a, b;
              {avail_a, avail_b, is_i4_a, is_i4_b} = 4'(f);
              mode_a = 4'(ma); mode_b = 4'(mb); prev_flag = pf[0]; rem_mode = 3'(rm);
              #1;
              a = is_i4_a ? ma : 2; b = is_i4_b ? mb : 2;
              p = (avail_a && avail_b) ? (a < b ? a : b) : 2;
              e = pf ? p : (rm < p ? rm : rm + 1);
              checks++;
              if (int'(mode) != e || int'(pred_mode) != p) failures++;
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
