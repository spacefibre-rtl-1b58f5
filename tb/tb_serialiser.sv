// tb_serialiser: checks that loaded words leave MSB first, one bit per
// cycle starting the cycle after the load, back to back, and that a disabled
// transmitter holds the line at 0.
module tb_serialiser;
  logic clk = 0, rst_n = 0, load = 0, enable = 1, sout;
  logic [39:0] word;
  int checks = 0, failures = 0;

  serialiser dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] w [4];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4; n++) w[n] = {8'($urandom), $urandom};
    // words loaded every 40 cycles must leave as one continuous stream
    @(negedge clk); load = 1; word = w[0];
    @(negedge clk); load = 0;
    for (int n = 0; n < 4; n++) begin
      for (int b = 39; b >= 0; b--) begin
        checks++;
        if (sout !== w[n][b]) begin
          failures++; $display("FAIL word %0d bit %0d", n, b);
        end
        if (b == 0 && n < 3) begin load = 1; word = w[n+1]; end
        @(negedge clk);
        load = 0;
      end
    end
    @(negedge clk); load = 1; word = '1; enable = 0;
    @(negedge clk); load = 0;
    repeat (10) begin checks++; if (sout !== 1'b0) failures++; @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
