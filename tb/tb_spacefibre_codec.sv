// tb_spacefibre_codec: end-to-end CODEC test with a short SKIP interval and
// WarmReset wait and a 1 % clock difference (see tb_codec_pair).
module tb_spacefibre_codec;
  tb_codec_pair #(.FULL(1'b0)) pair ();
endmodule
