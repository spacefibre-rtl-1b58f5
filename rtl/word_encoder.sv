// word_encoder: encodes one 32+4 link word into 40 bits per enabled cycle.
//
// Four enc8b10b characters are chained combinationally: byte 3 (sent first)
// is encoded at the stored running disparity and each next byte at the
// disparity the previous one left. The 40-bit result and the final disparity
// are registered when ce is high, so the output follows the input by one
// enabled cycle. Running disparity starts negative at reset.
//
// k_err is registered with the code: some byte had its K flag set but has no
// K code (it is then sent as the data code).
//
// Interface: word_in (sf_word_t), ce; code_out[39:30] holds byte 3's code.
module word_encoder
  import sf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  sf_word_t word_in,
  output logic [39:0] code_out,
  output logic     rd,       // running disparity after the last word
  output logic     k_err
);
  logic [4:0]  rdc;
  logic [3:0]  ke;
  logic [39:0] c;

  assign rdc[0] = rd;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    // lane i encodes byte (3-i)
    enc8b10b u_enc (
      .din   (word_in.d[8*(3-i) +: 8]),
      .k_in  (word_in.k[3-i]),
      .rd_in (rdc[i]),
      .code  (c[10*(3-i) +: 10]),
      .rd_out(rdc[i+1]),
      .k_err (ke[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_out <= '0;
      rd       <= 1'b0;
      k_err    <= 1'b0;
    end else if (ce) begin
      code_out <= c;
      rd       <= rdc[4];
      k_err    <= |ke;
    end
  end
endmodule
