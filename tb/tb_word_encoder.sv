// tb_word_encoder: checks the 4-character word encoder.
//
// The IDLE ordered set (K28.5 D0.1 D0.0 D0.0) and the INIT_1 ordered set are
// encoded from negative disparity and compared with codes worked out by hand
// from the 5B/6B, 3B/4B and K tables. Running disparity must carry across
// words: a second K28.5 word must come out in its positive form when the
// first left positive disparity. The output appears one enabled cycle later.
module tb_word_encoder;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0;
  sf_word_t word_in;
  logic [39:0] code_out;
  logic rd, k_err;
  int checks = 0, failures = 0;

  word_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [3:0] k, input logic [31:0] d, input logic [39:0] exp,
                      input logic exp_rd);
    @(negedge clk); word_in.k = k; word_in.d = d; ce = 1;
    @(negedge clk); ce = 0;
    checks++;
    if (code_out !== exp || rd !== exp_rd || k_err) begin
      failures++;
      $display("FAIL %h: got %b rd %b, exp %b rd %b", d, code_out, rd, exp, exp_rd);
    end
    // output must hold while ce is low
    @(negedge clk);
    checks++;
    if (code_out !== exp) failures++;
  endtask

  initial begin
    word_in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // IDLE: K28.5- 0011111010 (rd+), D0.1+ 0110001001 (rd-), D0.0- x2
    send(4'b1000, 32'hBC20_0000, {10'b0011111010, 10'b0110001001, 10'b1001110100,
                                  10'b1001110100}, 1'b0);
    // INIT_1 speed 0: K28.5- (rd+), D10.2 0101010101 (rd+), D0.1+ 0110001001 (rd-),
    // D0.0- 1001110100 (rd-)
    send(4'b1000, 32'hBC4A_2000, {10'b0011111010, 10'b0101010101, 10'b0110001001,
                                  10'b1001110100}, 1'b0);
    // K28.5 D0.0 D0.0 K28.5: K- (+), D0.0+ 0110001011 (+), D0.0+ (+), K+ 1100000101 (-)
    send(4'b1001, 32'hBC00_00BC, {10'b0011111010, 10'b0110001011, 10'b0110001011,
                                  10'b1100000101}, 1'b0);
    // K flag on D0.0, which has no K code: k_err
    @(negedge clk); word_in.k = 4'b0100; word_in.d = 32'h0000_0000; ce = 1;
    @(negedge clk); ce = 0;
    checks++; if (!k_err) begin failures++; $display("FAIL k_err not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
