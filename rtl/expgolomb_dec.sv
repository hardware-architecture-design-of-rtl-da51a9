// expgolomb_dec: Exp-Golomb decoder of the parser engine. Given the next 32 bits of the
// bitstream (bit 31 first), it finds the number of leading zeros n, takes the n+1 bits
// from the first one as codeNum+1, and returns the code length 2n+1 with the value: the
// unsigned ue(v) codeNum, or for signed se(v) the mapping 1, -1, 2, -2, ... Codes longer
// than 31 bits (n > 15) set err. The document names the unit; the decoding rule is the
// H.264 standard's. Interface: in_valid with bits and is_signed; len, value and err are
// registered (out_valid one cycle later). The caller advances its bit pointer by len.
module expgolomb_dec (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [31:0]        bits,
  input  logic               is_signed,
  output logic               out_valid,
  output logic [5:0]         len,
  output logic signed [31:0] value,
  output logic               err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; len <= '0; value <= '0; err <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        int n;
        logic [31:0] code;
        n = 32;
        for (int i = 31; i >= 0; i--)
          if (bits[i] && n == 32) n = 31 - i;
        if (n > 15) begin
          err <= 1'b1; len <= '0; value <= '0;
        end else begin
          code = (bits >> (31 - 2 * n)) - 32'd1;   // n+1 bits starting at the first one
          err  <= 1'b0;
          len  <= 6'(2 * n + 1);
          if (!is_signed)   value <= $signed(code);
          else if (code[0]) value <= $signed((code + 32'd1) >> 1);
          else              value <= -$signed(code >> 1);
        end
      end
    end
  end

endmodule
