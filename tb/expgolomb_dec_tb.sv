// expgolomb_dec_tb: encodes random ue(v) and se(v) values into Exp-Golomb codes, pads
// them with random following bits, and checks the decoded value, the length and the
// error flag for over-long codes.
module expgolomb_dec_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, is_signed, out_valid, err; logic [31:0] bits; logic [5:0] len;
  logic signed [31:0] value;
  expgolomb_dec dut (.*);
  int checks = 0, failures = 0;
  initial begin
    in_valid = 0; is_signed = 0; bits = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int k, v, n, l;
      longint code;
      is_signed = t % 2;
      v = (t < 40) ? t / 2 : int'($urandom_range(0, (1 << $urandom_range(1, 15)) - 2));
      if (is_signed) begin
        if (t % 4 == 3) v = -v;
        k = (v > 0) ? 2*v - 1 : -2*v;
      end else k = v;
      n = 0;
      while ((k + 1) >= (1 << (n + 1))) n++;
      l = 2*n + 1;
      code = longint'(k + 1) << (32 - l);
      bits = 32'(code) | (32'($urandom) >> l);
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || err || int'(len) != l || value != v) begin
        failures++;
        $display("FAIL v=%0d signed=%0d: len %0d value %0d err %0d", v, is_signed, len, value, err);
      end
    end
    bits = 32'h0000_8000; in_valid = 1;   // 16 leading zeros: too long
    @(negedge clk); in_valid = 0;
    checks++; if (!err) failures++;
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
