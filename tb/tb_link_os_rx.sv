// tb_link_os_rx: receive-side link ordered-set detection.
//
// Random mixes of INIT_1, INIT_2, IDLE, SKIP, framing ordered sets, data
// words and words marked invalid are fed in; one clock later exactly the
// matching event must pulse, the speed byte of an INIT must be captured,
// and only framing words (with pass_en high) may be passed up.
module tb_link_os_rx;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  rx_word_t in_word;
  logic in_valid = 0, pass_en = 0;
  logic got_init1, got_init2, got_idle, got_skip, got_invalid, up_valid;
  logic [7:0] rx_speed;
  sf_word_t up_word;
  int checks = 0, failures = 0;

  link_os_rx dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int kind;
    logic [7:0] spd;
    logic [5:0] exp;   // {init1, init2, idle, skip, invalid, up}
    sf_word_t w;
    int seen [6];
    spd = 8'h00;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      kind = $urandom_range(0, 6);
      pass_en = $urandom_range(0, 1);
      in_valid = ($urandom_range(0, 7) != 0);
      in_word.invalid = (kind == 6);
      unique case (kind)
        0: begin spd = $urandom; w = make_os(OS_INIT, D0_1, spd); end
        1: begin spd = $urandom; w = make_os(OS_INIT, D0_2, spd); end
        2: w = make_os(OS_IDLE, D0_0, D0_0);
        3: w = make_os(OS_SKIP, 8'($urandom), 8'($urandom));
        4: w = make_os(($urandom_range(0, 1) != 0) ? OS_SDF : 8'hC0, 8'($urandom), 8'($urandom));
        default: begin w.k = K_DATA; w.d = $urandom; end
      endcase
      in_word.w = w;
      exp = '0;
      if (in_valid) begin
        if (kind == 6) exp[1] = 1'b1;
        else if (kind < 4) exp[5 - kind] = 1'b1;
        else exp[0] = pass_en;
      end
      @(negedge clk);
      checks++;
      if ({got_init1, got_init2, got_idle, got_skip, got_invalid, up_valid} !== exp) begin
        failures++;
        $display("FAIL n=%0d kind %0d valid %b: got %b exp %b", n, kind, in_valid,
                 {got_init1, got_init2, got_idle, got_skip, got_invalid, up_valid}, exp);
      end
      for (int i = 0; i < 6; i++) if (exp[i]) seen[i]++;
      if (exp[0]) begin checks++; if (up_word !== w) failures++; end
      if (in_valid && kind < 2) begin checks++; if (rx_speed !== spd) failures++; end
    end
    for (int i = 0; i < 6; i++) begin checks++; if (seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
