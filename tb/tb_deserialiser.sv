// tb_deserialiser: a random bit stream must come out as consecutive 10-bit
// groups, first bit in bit 9, one group every ten bit-clock cycles.
module tb_deserialiser;
  logic clk = 0, rst_n = 0, sin = 0;
  logic [9:0] sym;
  logic sym_valid;
  int checks = 0, failures = 0;

  deserialiser dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic bits [2000];
  int   got = 0, last_t = -1, t = 0;
  always @(posedge clk) begin
    t++;
    if (rst_n && sym_valid) begin
      logic [9:0] exp;
      for (int i = 0; i < 10; i++) exp[9-i] = bits[got*10+i];
      checks++;
      if (sym !== exp) begin failures++; $display("FAIL group %0d %b exp %b", got, sym, exp); end
      if (last_t >= 0 && t - last_t != 10) begin failures++; $display("FAIL spacing"); end
      last_t = t;
      got++;
    end
  end

  initial begin
    for (int i = 0; i < 2000; i++) bits[i] = 1'($urandom);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin sin = bits[i]; @(negedge clk); end
    repeat (3) @(negedge clk);
    checks++;
    if (got != 200) begin failures++; $display("FAIL %0d groups", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
