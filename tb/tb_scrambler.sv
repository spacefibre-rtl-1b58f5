// tb_scrambler: the key stream is checked against a bit-serial model of the
// drawn shift register (D15 fed back to D0 and into D3, D4, D5, seed
// 0xFFFF), including reseeding; scrambling then de-scrambling with a second
// instance must return the data; scrambled all-zero idle words must not be
// constant.
module tb_scrambler;
  logic clk = 0, rst_n = 0, seed = 0, adv = 0;
  logic [31:0] din, dout, dout2;
  int checks = 0, failures = 0;

  scrambler dut  (.clk, .rst_n, .seed, .adv, .din, .dout);
  scrambler dut2 (.clk, .rst_n, .seed, .adv, .din(dout), .dout(dout2));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial reference: register r[0..15]
  logic r [16];
  task automatic ref_seed(); for (int i = 0; i < 16; i++) r[i] = 1'b1; endtask
  function automatic logic ref_bit();
    logic fb, o;
    fb = r[15]; o = r[15];
    for (int i = 15; i > 0; i--) r[i] = r[i-1];
    r[0] = fb;
    r[3] = r[3] ^ fb; r[4] = r[4] ^ fb; r[5] = r[5] ^ fb;
    return o;
  endfunction

  initial begin
    logic [31:0] key, last;
    int distinct;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); seed = 1; @(negedge clk); seed = 0;
    ref_seed(); distinct = 0; last = '0;
    for (int n = 0; n < 300; n++) begin
      if (n == 150) begin
        seed = 1; @(negedge clk); seed = 0; ref_seed();
      end
      din = $urandom;
      #1;
      for (int i = 31; i >= 0; i--) key[i] = ref_bit();
      checks++;
      if (dout !== (din ^ key)) begin
        failures++; if (failures < 5) $display("FAIL word %0d %h exp %h", n, dout, din ^ key);
      end
      checks++;
      if (dout2 !== din) begin failures++; $display("FAIL descramble word %0d", n); end
      if (key != last) distinct++;
      last = key;
      adv = 1; @(negedge clk); adv = 0;
    end
    checks++;
    if (distinct < 290) begin failures++; $display("FAIL key stream repeats"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
