// h264_codec_top_full_tb: the same end-to-end test with the codec top at its default
// parameters (eight candidates, search range H[-64,+63] V[-32,+31]).
module h264_codec_top_full_tb;
  codec_tb_body #(.FULL(1'b1)) body ();
endmodule
