// tb_dec8b10b: checks the 8B/10B character decoder.
//
// Each data character and each legal K character is encoded with the
// encoder at both running disparities and must decode back with no error and
// the right disparity. Codes from the K table given at the wrong disparity
// must raise a disparity error, and patterns that no character uses (all
// zeros, all ones, 6-bit sub-blocks with five equal bits) a code error.
module tb_dec8b10b;
  import sf_pkg::*;
  logic [9:0] code;
  logic       rd_in;
  logic [7:0] dout;
  logic       k_out, rd_out, code_err, disp_err;
  int checks = 0, failures = 0;

  dec8b10b dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_err(input logic [9:0] c, input logic rd, input logic want_code_err);
    code = c; rd_in = rd; #1;
    checks++;
    if (want_code_err ? !code_err : !(disp_err && !code_err)) begin
      failures++;
      $display("FAIL error not flagged for %b rd %b (code_err %b disp_err %b)", c, rd,
               code_err, disp_err);
    end
  endtask

  initial begin
    logic [10:0] e;
    for (int rd = 0; rd < 2; rd++)
      for (int kk = 0; kk < 2; kk++)
        for (int v = 0; v < 256; v++) begin
          if (kk == 1 && !k_legal(8'(v))) continue;
          e = enc8b10b_f(8'(v), kk[0], rd[0]);
          code = e[9:0]; rd_in = rd[0]; #1;
          checks++;
          if (dout !== 8'(v) || k_out !== kk[0] || code_err || disp_err || rd_out !== e[10]) begin
            failures++;
            if (failures < 10) $display("FAIL decode %0d k%0d rd%0d -> %h k%b err %b%b", v, kk, rd,
                                        dout, k_out, code_err, disp_err);
          end
        end
    // K28.5 of negative disparity received while disparity is positive
    expect_err(10'b001111_1010, 1'b1, 1'b0);
    expect_err(10'b110000_0101, 1'b0, 1'b0);
    // unused patterns
    expect_err(10'b0000000000, 1'b0, 1'b1);
    expect_err(10'b1111111111, 1'b1, 1'b1);
    expect_err(10'b111110_0101, 1'b0, 1'b1);
    expect_err(10'b000001_1010, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
