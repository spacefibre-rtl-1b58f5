// tb_rx_sync_fsm: receive synchronisation sequences.
//
// 1. comma then four clean commas: SymbolSync -> CheckSync -> Ready.
// 2. invalid word in Ready: lost_sync pulse, back to SymbolSync.
// 3. invalid word in CheckSync (after the first word): polarity flips.
// 4. realignment in CheckSync: back to SymbolSync, polarity unchanged.
module tb_rx_sync_fsm;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cd = 0, cr = 0, dec_valid = 0, dec_invalid = 0;
  logic ready, lost_sync, invert;
  rs_state_e state;
  int checks = 0, failures = 0, n_lost = 0;

  rx_sync_fsm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && lost_sync) n_lost++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_cd(); @(negedge clk); cd = 1; @(negedge clk); cd = 0; endtask
  task automatic word(input logic bad);
    @(negedge clk); dec_valid = 1; dec_invalid = bad; @(negedge clk); dec_valid = 0;
    dec_invalid = 0;
  endtask
  task automatic expect_state(input rs_state_e s, input string what);
    @(negedge clk); checks++;
    if (state !== s) begin failures++; $display("FAIL %s: state %s", what, state.name()); end
  endtask

  initial begin
    logic inv0;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_state(RS_SYMBOL_SYNC, "reset");
    pulse_cd(); expect_state(RS_CHECK_SYNC, "first comma");
    word(1'b1);   // first word after alignment is forgiven
    expect_state(RS_CHECK_SYNC, "first word forgiven");
    repeat (3) begin pulse_cd(); word(1'b0); end
    expect_state(RS_CHECK_SYNC, "three commas");
    pulse_cd(); expect_state(RS_READY, "four commas");
    checks++; if (!ready) failures++;
    word(1'b0); expect_state(RS_READY, "clean word");
    inv0 = invert;
    word(1'b1); expect_state(RS_SYMBOL_SYNC, "invalid in ready");
    checks++; if (n_lost != 1) begin failures++; $display("FAIL lost_sync count %0d", n_lost); end
    checks++; if (invert !== inv0) failures++;
    pulse_cd(); word(1'b0); word(1'b1);
    expect_state(RS_SYMBOL_SYNC, "invalid in check");
    checks++; if (invert === inv0) begin failures++; $display("FAIL polarity not flipped"); end
    pulse_cd(); word(1'b0);
    @(negedge clk); cr = 1; @(negedge clk); cr = 0;
    expect_state(RS_SYMBOL_SYNC, "realign in check");
    checks++; if (invert === inv0 || n_lost != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
