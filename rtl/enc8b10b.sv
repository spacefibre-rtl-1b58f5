// enc8b10b: 8B/10B encoder for one character (combinational).
//
// The byte is split into its 5 low bits (EDCBA) and 3 high bits (HGF). The
// 5 low bits go through the 5B/6B table and the 3 high bits through the 3B/4B
// table; the disparity left by the 6-bit sub-block chooses the 4-bit form, and
// the 4-bit sub-block gives the running disparity handed to the next character.
// Tables, sub-block split and running-disparity rule follow the standard
// 8B/10B code. K flags a control character; only the twelve legal K codes
// exist, and k_err flags a request for any other.
//
// Interface: din/k_in/rd_in in, code/rd_out out, no clock. rd = 0 means
// negative running disparity. code is {a,b,c,d,e,i,f,g,h,j}, bit 9 sent first.
module enc8b10b
  import sf_pkg::*;
(
  input  logic [7:0] din,
  input  logic       k_in,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out,
  output logic       k_err
);
  logic [10:0] r;
  always_comb begin
    r      = enc8b10b_f(din, k_in, rd_in);
    code   = r[9:0];
    rd_out = r[10];
    k_err  = k_in && !k_legal(din);
  end
endmodule
