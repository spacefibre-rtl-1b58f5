// tb_enc8b10b: checks the 8B/10B character encoder against tabulated codes.
//
// The expected codes are the K-code table (K28.0-K28.7, K23.7, K27.7, K29.7,
// K30.7 at both disparities) and the first rows of the 5B/6B table (D0-D10
// with y = 0 where the 3B/4B form is fixed). A random character stream is
// also checked for DC balance (running disparity stays within +-1 after
// every character) and for runs of at most five equal bits.
module tb_enc8b10b;
  logic [7:0] din;
  logic       k_in, rd_in;
  logic [9:0] code;
  logic       rd_out, k_err;
  int checks = 0, failures = 0;

  enc8b10b dut (.*);

  task automatic chk(input logic [7:0] b, input logic k, input logic rd,
                     input logic [9:0] exp);
    din = b; k_in = k; rd_in = rd;
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s%0d.%0d rd%s: got %b exp %b", k ? "K" : "D", b[4:0], b[7:5],
               rd ? "+" : "-", code, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rd;
    int   disp, run, last;
    // K codes: {negative RD, positive RD}
    chk(8'h1C, 1, 0, 10'b001111_0100); chk(8'h1C, 1, 1, 10'b110000_1011);
    chk(8'h3C, 1, 0, 10'b001111_1001); chk(8'h3C, 1, 1, 10'b110000_0110);
    chk(8'h5C, 1, 0, 10'b001111_0101); chk(8'h5C, 1, 1, 10'b110000_1010);
    chk(8'h7C, 1, 0, 10'b001111_0011); chk(8'h7C, 1, 1, 10'b110000_1100);
    chk(8'h9C, 1, 0, 10'b001111_0010); chk(8'h9C, 1, 1, 10'b110000_1101);
    chk(8'hBC, 1, 0, 10'b001111_1010); chk(8'hBC, 1, 1, 10'b110000_0101);
    chk(8'hDC, 1, 0, 10'b001111_0110); chk(8'hDC, 1, 1, 10'b110000_1001);
    chk(8'hFC, 1, 0, 10'b001111_1000); chk(8'hFC, 1, 1, 10'b110000_0111);
    chk(8'hF7, 1, 0, 10'b111010_1000); chk(8'hF7, 1, 1, 10'b000101_0111);
    chk(8'hFB, 1, 0, 10'b110110_1000); chk(8'hFB, 1, 1, 10'b001001_0111);
    chk(8'hFD, 1, 0, 10'b101110_1000); chk(8'hFD, 1, 1, 10'b010001_0111);
    chk(8'hFE, 1, 0, 10'b011110_1000); chk(8'hFE, 1, 1, 10'b100001_0111);
    // data: 6-bit part from the 5B/6B table, 4-bit part from the 3B/4B table
    chk(8'h00, 0, 0, 10'b100111_0100);  // D0.0 rd-: 6b unbalanced -> 4b at rd+
    chk(8'h00, 0, 1, 10'b011000_1011);
    chk(8'h03, 0, 0, 10'b110001_1011);  // D3.0
    chk(8'h03, 0, 1, 10'b110001_0100);
    chk(8'h07, 0, 0, 10'b111000_1011);  // D7.0
    chk(8'h07, 0, 1, 10'b000111_0100);
    chk(8'h0A, 0, 0, 10'b010101_1011);  // D10.0
    chk(8'h4A, 0, 0, 10'b010101_0101);  // D10.2 (INIT)
    chk(8'h20, 0, 0, 10'b100111_1001);  // D0.1 (IDLE)
    chk(8'h40, 0, 1, 10'b011000_0101);  // D0.2
    chk(8'h68, 0, 0, 10'b111001_0011);  // D8.3: 6b leaves rd+, x.3 at rd+
    // random stream: disparity and run length
    rd = 0; disp = -1; run = 0; last = -1;
    for (int n = 0; n < 20000; n++) begin
      din = 8'($urandom); k_in = 0; rd_in = rd;
      if (($urandom % 8) == 0) begin din = 8'hBC; k_in = 1; end
      #1;
      for (int b = 9; b >= 0; b--) begin
        disp += code[b] ? 1 : -1;
        if (int'(code[b]) == last) run++; else run = 1;
        last = int'(code[b]);
        if (run > 5) begin failures++; run = 0; $display("FAIL run length"); end
      end
      checks++;
      if (!(disp == 1 && rd_out) && !(disp == -1 && !rd_out)) begin
        failures++;
        if (failures < 5) $display("FAIL disparity %0d rd %b", disp, rd_out);
      end
      rd = rd_out;
    end
    // illegal K request flagged
    din = 8'h00; k_in = 1; #1; checks++; if (!k_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
