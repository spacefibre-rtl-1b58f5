// tb_rx_polarity: groups pass unchanged with invert low and bit-inverted
// with invert high, one cycle later; groups without a valid strobe are held.
module tb_rx_polarity;
  logic clk = 0, rst_n = 0, sym_in_valid = 0, invert = 0, sym_out_valid;
  logic [9:0] sym_in, sym_out;
  int checks = 0, failures = 0;

  rx_polarity dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] v, held;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      v = 10'($urandom); invert = 1'($urandom);
      sym_in = v; sym_in_valid = 1;
      @(negedge clk);
      sym_in_valid = 0; sym_in = ~v;
      checks++;
      if (!sym_out_valid || sym_out !== (invert ? ~v : v)) begin
        failures++; $display("FAIL %b inv %b -> %b", v, invert, sym_out);
      end
      held = sym_out;
      @(negedge clk);
      checks++;
      if (sym_out_valid || sym_out !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
