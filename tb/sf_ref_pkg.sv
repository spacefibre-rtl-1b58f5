// sf_ref_pkg: reference models used by the framing testbenches.
//
// Bit-serial models of the frame scrambler (16-stage register, D15 fed back
// to D0 and into D3, D4, D5, seed 0xFFFF) and of the frame CRC
// (x^16 + x^12 + x^5 + 1, preset 0xFFFF, bytes most significant first),
// written independently of the RTL.
package sf_ref_pkg;
  class scr_model;
    bit r [16];
    function void reseed(); foreach (r[i]) r[i] = 1'b1; endfunction
    function bit [31:0] key();
      bit [31:0] k;
      for (int i = 31; i >= 0; i--) begin
        bit fb;
        fb = r[15]; k[i] = fb;
        for (int j = 15; j > 0; j--) r[j] = r[j-1];
        r[0] = fb; r[3] ^= fb; r[4] ^= fb; r[5] ^= fb;
      end
      return k;
    endfunction
  endclass

  function automatic bit [15:0] crc_word(bit [15:0] c, bit [31:0] w);
    for (int b = 3; b >= 0; b--) begin
      c ^= {w[8*b +: 8], 8'h00};
      for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction
endpackage
