// tb_symbol_sync: character and ordered-set alignment.
//
// A stream of encoded words (an ordered set every fourth word, data words in
// between) is preceded by a random number of idle-line bits, so the 10-bit
// groups start at an arbitrary bit offset. After the first comma every
// output word must equal the next transmitted 40-bit word, and one comma
// must be reported per ordered set. Half way through, one extra bit is
// slipped into the line: a realignment (cr) must be reported and the words
// (the words up to that comma are not checked)
// after the next comma must again be the transmitted ones.
module tb_symbol_sync;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] sym;
  logic sym_valid = 0, cd, cr, word_valid;
  logic [39:0] word;
  int checks = 0, failures = 0;

  symbol_sync dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 400;
  logic [39:0] tx [NW];
  logic bits [$];
  int   n_cd = 0, n_cr = 0, idx = -1, matched = 0, slip_word;

  always @(posedge clk) if (rst_n) begin
    if (cd) n_cd++;
    if (cr) n_cr++;
    if (word_valid) begin
      if (idx < 0) begin
        for (int i = 0; i < NW; i++) if (tx[i] == word && i % 4 == 0) begin idx = i; break; end
        if (idx < 0) begin failures++; $display("FAIL unexpected first word %h", word); end
      end else if (idx <= slip_word || idx > slip_word + 3) begin
        // words between the slip and the next comma are misaligned by design
        checks++;
        if (word !== tx[idx]) begin
          failures++;
          if (failures < 5) $display("FAIL word %0d: %h exp %h", idx, word, tx[idx]);
        end else matched++;
      end
      idx++;
    end
    // after the slip, look for the stream again at the next ordered set
    if (cr && idx > 10) idx = -1;
  end

  initial begin
    logic rd;
    logic [10:0] e;
    int pre;
    rd = 0;
    for (int i = 0; i < NW; i++) begin
      logic [31:0] d;
      logic [3:0]  k;
      d = $urandom; k = 4'b0000;
      if (i % 4 == 0) begin d[31:24] = K28_5; d[23:16] = OS_IDLE; k = K_OS; end
      for (int b = 3; b >= 0; b--) begin
        e = enc8b10b_f(d[8*b +: 8], k[b], rd);
        rd = e[10];
        tx[i][10*b +: 10] = e[9:0];
      end
    end
    pre = 3 + $urandom % 30;
    for (int i = 0; i < pre; i++) bits.push_back(1'b0);
    slip_word = NW / 2 + 1;
    for (int i = 0; i < NW; i++) begin
      for (int b = 39; b >= 0; b--) bits.push_back(tx[i][b]);
      if (i == slip_word) bits.push_back(1'b1);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    while (bits.size() >= 10) begin
      for (int b = 9; b >= 0; b--) sym[b] = bits.pop_front();
      sym_valid = 1; @(negedge clk); sym_valid = 0;
      repeat (9) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (matched < NW - 20) begin failures++; $display("FAIL only %0d words matched", matched); end
    checks++;
    if (n_cd < NW / 4 - 3 || n_cd > NW / 4) begin failures++; $display("FAIL %0d commas", n_cd); end
    checks++;
    if (n_cr < 1) begin failures++; $display("FAIL %0d realignments", n_cr); end
    $display("matched %0d words, %0d commas, %0d realignments", matched, n_cd, n_cr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
