// h264_codec_top_tb: end-to-end test of the codec top at a reduced IME search range
// (H[-16,+15], V[-8,+7]); the test itself is in codec_tb_body.
module h264_codec_top_tb;
  codec_tb_body #(.FULL(1'b0)) body ();
endmodule
