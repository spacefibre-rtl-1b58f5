// dec8b10b: 8B/10B decoder for one character (combinational).
//
// The code is matched against the encoding of every data character and every
// legal K character at the current running disparity. A match gives the byte
// and the K flag. A code that only matches at the opposite disparity is
// decoded but flagged as a disparity error; a code that matches nothing (one
// of the unused 10-bit patterns) is a code error. Either error counts as
// invalid data. The running disparity handed on is that of the received code,
// so a disparity error also resynchronises the decoder's disparity.
// The document states only that unused codes reveal link errors; the
// exhaustive match is this design's way of building the decoder.
//
// Interface: code/rd_in in; dout, k_out, rd_out, code_err, disp_err out.
module dec8b10b
  import sf_pkg::*;
(
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic [7:0] dout,
  output logic       k_out,
  output logic       rd_out,
  output logic       code_err,
  output logic       disp_err
);
  always_comb begin
    logic [10:0] e;
    logic        hit, hit_other;
    logic [7:0]  b_other;
    logic        k_other;
    logic        rd_other;
    hit       = 1'b0;
    hit_other = 1'b0;
    dout      = 8'h00;
    k_out     = 1'b0;
    rd_out    = rd_in;
    b_other   = 8'h00;
    k_other   = 1'b0;
    rd_other  = rd_in;
    for (int kk = 0; kk < 2; kk++) begin
      for (int v = 0; v < 256; v++) begin
        if (kk == 0 || k_legal(8'(v))) begin
          e = enc8b10b_f(8'(v), kk[0], rd_in);
          if (e[9:0] == code) begin
            hit    = 1'b1;
            dout   = 8'(v);
            k_out  = kk[0];
            rd_out = e[10];
          end
          e = enc8b10b_f(8'(v), kk[0], !rd_in);
          if (e[9:0] == code) begin
            hit_other = 1'b1;
            b_other   = 8'(v);
            k_other   = kk[0];
            rd_other  = e[10];
          end
        end
      end
    end
    code_err = !hit && !hit_other;
    disp_err = !hit && hit_other;
    if (disp_err) begin
      dout   = b_other;
      k_out  = k_other;
      rd_out = rd_other;
    end
  end
endmodule
