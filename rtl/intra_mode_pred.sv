// intra_mode_pred: prediction of a 4x4 intra mode in the decoder. The predicted mode is
// the smaller of the modes of the left (A) and upper (B) 4x4 blocks; it is DC (2) when
// either neighbour is unavailable, and a neighbour that is not coded in 4x4 intra mode
// counts as DC. If the bitstream flag prev_flag is set the predicted mode is used,
// otherwise rem_mode selects one of the other eight modes (rem_mode, or rem_mode + 1 when
// it is not below the predicted one). The document names this unit; the rule is the
// H.264 standard's. Combinational.
module intra_mode_pred (
  input  logic       avail_a,
  input  logic       avail_b,
  input  logic       is_i4_a,
  input  logic       is_i4_b,
  input  logic [3:0] mode_a,
  input  logic [3:0] mode_b,
  input  logic       prev_flag,
  input  logic [2:0] rem_mode,
  output logic [3:0] pred_mode,
  output logic [3:0] mode
);

  always_comb begin
    logic [3:0] ma, mb;
    ma = is_i4_a ? mode_a : 4'd2;
    mb = is_i4_b ? mode_b : 4'd2;
    if (!avail_a || !avail_b) pred_mode = 4'd2;
    else                      pred_mode = (ma < mb) ? ma : mb;
    if (prev_flag)                       mode = pred_mode;
    else if ({1'b0, rem_mode} < pred_mode) mode = {1'b0, rem_mode};
    else                                 mode = {1'b0, rem_mode} + 4'd1;
  end

endmodule
