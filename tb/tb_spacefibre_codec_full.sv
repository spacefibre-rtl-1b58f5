// tb_spacefibre_codec_full: end-to-end CODEC test with the CODEC's default
// parameters (SKIP every 5000 words, 10 us WarmReset wait) and a 0.01 %
// clock difference (see tb_codec_pair).
module tb_spacefibre_codec_full;
  tb_codec_pair #(.FULL(1'b1)) pair ();
endmodule
