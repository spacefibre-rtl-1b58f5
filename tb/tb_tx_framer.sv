// tb_tx_framer: transmit framing.
//
// With no user frame the framer must send idle frames: SIF (BC 60 00 FF),
// 255 scrambled zero words, EOF with the CRC of those words. A user frame
// offered while an idle frame runs must cut it short with EOF, then go out
// as SDF (VC, length), the data words scrambled with a freshly seeded key
// stream, and EOF with the CRC over the scrambled words. A user ordered set
// offered in the middle of a frame must appear in the next slot without
// disturbing the frame. Every word slot is taken (take = 1 each cycle).
module tb_tx_framer;
  import sf_pkg::*;
  import sf_ref_pkg::*;
  logic clk = 0, rst_n = 0, active = 0, take = 1;
  logic [31:0] user_txdata, user_tx_ord_set;
  logic user_txdata_rdy = 0, user_txdata_read, user_tx_ord_set_rdy = 0, user_tx_ord_set_read;
  sf_word_t out_word;
  logic out_valid, idle_frame_cut, data_frame_sent;
  int checks = 0, failures = 0;

  tx_framer dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // user frame source: first word {VC, LEN}, then LEN data words
  logic [31:0] frame [$];
  always_comb begin
    user_txdata_rdy = frame.size() > 0;
    user_txdata     = frame.size() > 0 ? frame[0] : 32'h0;
  end
  always @(posedge clk) if (user_txdata_read) void'(frame.pop_front());
  always @(posedge clk) if (user_tx_ord_set_read) user_tx_ord_set_rdy <= 0;

  // monitor
  scr_model m = new();
  bit [15:0] c;
  int  state = 0, n = 0, len = 0, idle_frames = 0, data_frames = 0, cut = 0, os_seen = 0;
  logic [31:0] sent [$];
  task automatic fail(string s); failures++; if (failures < 10) $display("FAIL %s", s); endtask
  always @(posedge clk) if (rst_n && active) begin
    checks++;
    if (out_word.k == K_OS && out_word.d == 32'hBCC0_1234) os_seen++;
    else if (out_word.k == K_OS && out_word.d[31:16] == 16'hBC60) begin  // SIF
      if (out_word.d[15:0] != 16'h00FF) fail("SIF fields");
      m.reseed(); c = 16'hFFFF; state = 1; n = 0;
    end else if (out_word.k == K_OS && out_word.d[31:16] == 16'hBC40) begin  // SDF
      if (out_word.d[15:8] != 8'h5A) fail("SDF VC");
      len = out_word.d[7:0];
      m.reseed(); c = 16'hFFFF; state = 2; n = 0;
    end else if (out_word.k == K_OS && out_word.d[31:16] == 16'hBC80) begin  // EOF
      if (out_word.d[15:0] != c) fail($sformatf("EOF CRC %h exp %h", out_word.d[15:0], c));
      if (state == 1) begin idle_frames++; if (n < 255) cut++; end
      if (state == 2) begin
        data_frames++;
        if (n != len) fail("data frame length");
      end
      state = 0;
    end else if (out_word.k == K_DATA) begin
      bit [31:0] k;
      k = m.key();
      c = crc_word(c, out_word.d);
      n++;
      if (state == 1 && out_word.d != k) fail("idle word not scrambled zero");
      if (state == 2 && (out_word.d ^ k) != sent[0]) fail($sformatf("data word %0d", n));
      if (state == 2) void'(sent.pop_front());
      if (state == 0) fail("data outside frame");
    end else fail($sformatf("unexpected word %h/%b", out_word.d, out_word.k));
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; active = 1;
    repeat (600) @(negedge clk);          // two full idle frames and a bit
    for (int f = 0; f < 3; f++) begin
      int l;
      l = (f == 0) ? 20 : (f == 1) ? 255 : 1;
      frame.push_back({16'h0, 8'h5A, 8'(l)});
      for (int i = 0; i < l; i++) begin
        logic [31:0] d;
        d = $urandom; frame.push_back(d); sent.push_back(d);
      end
      repeat (l / 2) @(negedge clk);
      if (f == 1) user_tx_ord_set_rdy = 1;  // user OS in the middle of a frame
      user_tx_ord_set = 32'hBCC0_1234;
      wait (frame.size() == 0);
      repeat (100) @(negedge clk);
    end
    @(negedge clk);
    checks++; if (idle_frames < 3) fail($sformatf("%0d idle frames", idle_frames));
    checks++; if (data_frames != 3) fail($sformatf("%0d data frames", data_frames));
    checks++; if (cut < 1) fail("idle frame never cut short");
    checks++; if (os_seen != 1) fail("user ordered set");
    $display("idle frames %0d (cut %0d), data frames %0d", idle_frames, cut, data_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
