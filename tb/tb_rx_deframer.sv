// tb_rx_deframer: receive framing.
//
// Frames are built with the reference scrambler and CRC: a data frame must
// give SOF {VC, length}, the de-scrambled words and EOF with no error; an
// idle frame must give nothing on the data interface; an FCT ordered set
// inside a data frame must come out on the ordered-set interface; a frame
// with a wrong CRC must raise the CRC error; an EOF after too few words the
// frame length error; a data word between frames the out-of-frame error.
module tb_rx_deframer;
  import sf_pkg::*;
  import sf_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  sf_word_t in_word;
  logic in_valid = 0;
  logic [31:0] user_rxdata, user_rx_ord_set;
  logic user_rxdata_sof, user_rxdata_eof, user_rxdata_valid, user_rx_out_of_frame_error;
  logic user_frame_length_error, user_rx_crc_error, user_rx_ord_set_valid, idle_frame_removed;
  int checks = 0, failures = 0;

  rx_deframer dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected data-interface words {sof, eof, data}
  logic [33:0] exp_q [$];
  int n_oof = 0, n_len = 0, n_crc = 0, n_os = 0, n_idle = 0;
  always @(posedge clk) if (rst_n) begin
    if (user_rxdata_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output %h", user_rxdata); end
      else begin
        logic [33:0] e;
        e = exp_q.pop_front();
        if ({user_rxdata_sof, user_rxdata_eof, user_rxdata} !== e) begin
          failures++;
          $display("FAIL got %b%b %h exp %b%b %h", user_rxdata_sof, user_rxdata_eof,
                   user_rxdata, e[33], e[32], e[31:0]);
        end
      end
    end
    if (user_rx_out_of_frame_error) n_oof++;
    if (user_frame_length_error) n_len++;
    if (user_rx_crc_error) n_crc++;
    if (idle_frame_removed) n_idle++;
    if (user_rx_ord_set_valid) begin
      n_os++;
      checks++; if (user_rx_ord_set !== 32'hBCC0_0703) failures++;
    end
  end

  task automatic put(input logic [3:0] k, input logic [31:0] d);
    @(negedge clk); in_word.k = k; in_word.d = d; in_valid = 1;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic frame(input bit idle, input int len, input int send_len, input bit bad_crc,
                       input bit with_os);
    scr_model m = new();
    bit [15:0] c = 16'hFFFF;
    m.reseed();
    put(K_OS, {K28_5, idle ? OS_SIF : OS_SDF, 8'h03, 8'(len)});
    if (!idle) exp_q.push_back({2'b10, 16'h0, 8'h03, 8'(len)});
    for (int i = 0; i < send_len; i++) begin
      logic [31:0] d, s;
      d = idle ? 32'h0 : $urandom;
      s = d ^ m.key();
      c = crc_word(c, s);
      put(K_DATA, s);
      if (!idle) exp_q.push_back({2'b00, d});
      if (with_os && i == send_len / 2) put(K_OS, 32'hBCC0_0703);
    end
    if (bad_crc) c ^= 16'h0100;
    put(K_OS, {K28_5, OS_EOF, c});
    if (!idle) exp_q.push_back({2'b01, 31'h0, bad_crc});
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    frame(0, 10, 10, 0, 0);
    frame(1, 255, 255, 0, 0);
    frame(0, 255, 255, 0, 1);
    frame(1, 255, 40, 0, 0);      // idle frame cut short: no length error
    frame(0, 5, 5, 1, 0);         // bad CRC
    frame(0, 8, 6, 0, 0);         // EOF too early
    put(K_DATA, 32'h1234_5678);   // outside any frame
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    checks++; if (n_crc != 1) begin failures++; $display("FAIL crc errors %0d", n_crc); end
    checks++; if (n_len != 1) begin failures++; $display("FAIL length errors %0d", n_len); end
    checks++; if (n_oof != 1) begin failures++; $display("FAIL out-of-frame errors %0d", n_oof); end
    checks++; if (n_os != 1) begin failures++; $display("FAIL ordered sets %0d", n_os); end
    checks++; if (n_idle != 2) begin failures++; $display("FAIL idle frames %0d", n_idle); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
