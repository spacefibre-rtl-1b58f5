// tb_crc16: the CRC register is compared with a byte-wise CCITT model
// (x^16 + x^12 + x^5 + 1, preset 0xFFFF) over random frames of different
// lengths with clears in between and idle cycles between words, and with the
// published check value 0xA12B of the ASCII string "12345678".
module tb_crc16;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [31:0] din;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction

  initial begin
    logic [15:0] r;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      clr = 1; @(negedge clk); clr = 0;
      r = 16'hFFFF;
      for (int n = 0; n < 1 + f * 3; n++) begin
        din = $urandom; en = 1;
        for (int b = 3; b >= 0; b--) r = ref_byte(r, din[8*b +: 8]);
        @(negedge clk);
        en = 0;
        if ($urandom % 2) @(negedge clk);  // idle cycles must hold the value
        checks++;
        if (crc !== r) begin failures++; $display("FAIL frame %0d word %0d %h exp %h", f, n, crc, r); end
      end
    end
    // known answer: CRC-16/CCITT-FALSE of "12345678" is 0xA12B
    clr = 1; @(negedge clk); clr = 0;
    din = 32'h31323334; en = 1; @(negedge clk);
    din = 32'h35363738; @(negedge clk); en = 0;
    checks++;
    if (crc !== 16'hA12B) begin failures++; $display("FAIL known answer %h", crc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
