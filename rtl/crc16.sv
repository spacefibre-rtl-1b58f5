// crc16: 16-bit CRC over the data words of a frame.
//
// The document asks for a 16-bit CRC computed over the words between start
// and end of frame and carried in the EOF ordered set, but does not give the
// polynomial. This block uses the CCITT polynomial x^16 + x^12 + x^5 + 1,
// preset to 0xFFFF, no final inversion, fed 32 bits per word, bit 31 first;
// all of that is this design's choice. clr presets the register, en adds
// din. crc holds the value over all words added since clr.
//
// Interface: clr, en, din in; crc out (registered).
module crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [31:0] din,
  output logic [15:0] crc
);
  function automatic logic [15:0] step32(input logic [15:0] c, input logic [31:0] d);
    logic [15:0] r;
    logic        fb;
    r = c;
    for (int i = 31; i >= 0; i--) begin
      fb = r[15] ^ d[i];
      r  = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   crc <= 16'hFFFF;
    else if (clr) crc <= 16'hFFFF;
    else if (en)  crc <= step32(crc, din);
  end
endmodule
