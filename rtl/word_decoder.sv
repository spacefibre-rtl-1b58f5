// word_decoder: decodes one aligned 40-bit group into a 32+4 link word.
//
// Four dec8b10b characters are chained through the running disparity, the
// code in bits 39:30 being the first one received (byte 3). When ce is high
// the decoded word, its invalid flag (any code or disparity error in the four
// characters) and the final running disparity are registered, so the output
// follows the input by one enabled cycle; valid_out marks that cycle.
//
// Interface: code_in[39:0], ce in; word_out, invalid, valid_out out.
module word_decoder
  import sf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [39:0] code_in,
  output sf_word_t    word_out,
  output logic        invalid,
  output logic        valid_out
);
  logic       rd;
  logic [4:0] rdc;
  logic [3:0] cerr, derr;
  sf_word_t   w;

  assign rdc[0] = rd;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    dec8b10b u_dec (
      .code    (code_in[10*(3-i) +: 10]),
      .rd_in   (rdc[i]),
      .dout    (w.d[8*(3-i) +: 8]),
      .k_out   (w.k[3-i]),
      .rd_out  (rdc[i+1]),
      .code_err(cerr[i]),
      .disp_err(derr[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_out  <= '0;
      invalid   <= 1'b0;
      valid_out <= 1'b0;
      rd        <= 1'b0;
    end else begin
      valid_out <= ce;
      if (ce) begin
        word_out <= w;
        invalid  <= |(cerr | derr);
        rd       <= rdc[4];
      end
    end
  end
endmodule
