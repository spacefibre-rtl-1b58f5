// tb_word_decoder: checks the 4-character word decoder.
//
// Random words (data words and ordered sets) are encoded by the word
// encoder and fed to the decoder; each must come back unchanged with the
// invalid flag low, one enabled cycle after it is presented. Single bit
// flips are then injected and must raise the invalid flag.
module tb_word_decoder;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  sf_word_t w_in, w_out;
  logic [39:0] code, code_err;
  logic rd, invalid, valid_out;
  int checks = 0, failures = 0, flagged = 0;

  word_encoder u_enc (.clk, .rst_n, .ce, .word_in(w_in), .code_out(code), .rd);
  word_decoder dut (.clk, .rst_n, .ce, .code_in(code_err), .word_out(w_out), .invalid,
                    .valid_out);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic flip;
  int   flip_bit;
  logic after_flip = 0;
  assign code_err = flip ? (code ^ (40'd1 << flip_bit)) : code;

  initial begin
    sf_word_t exp;
    flip = 0; flip_bit = 0; w_in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      w_in.d = $urandom; w_in.k = 4'b0000;
      if (n % 3 == 0) begin w_in.k = 4'b1000; w_in.d[31:24] = 8'hBC; end
      ce = 1;
      @(negedge clk); ce = 0;  // encoder output now valid
      exp = w_in;
      flip = (n >= 1000) && (n % 2 == 1);
      flip_bit = $urandom % 40;
      ce = 1;
      @(negedge clk); ce = 0;
      checks++;
      if (!valid_out) failures++;
      if (!flip && !after_flip) begin
        if (w_out !== exp || invalid) begin
          failures++;
          if (failures < 10) $display("FAIL %h/%b -> %h/%b inv %b", exp.d, exp.k, w_out.d,
                                      w_out.k, invalid);
        end
      end else if (invalid) flagged++;
      // the word after an error may see the disparity error it left behind
      after_flip = flip;
      flip = 0;
    end
    // a flipped bit gives a wrong code or disparity in almost all cases
    checks++;
    if (flagged < 400) begin failures++; $display("FAIL only %0d of 500 errors flagged", flagged); end
    $display("flagged %0d of 500 single-bit errors", flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
