// tb_link_init_fsm: link initialisation state machine.
//
// Directed walk through every state and transition: the WarmReset wait (10
// slots here), Link Start to NotConnected, seven INIT_1 not being enough and
// eight leading to NearEndConnected, the INIT_2 exchange to Connected, eight
// IDLE slots to Active, loss of sync and a received INIT_1 sending the link
// back to NotConnected, the FarEndConnected path, init_reset, Auto Start
// waiting in Listen with the transmitter quiet, and dropping both starts.
module tb_link_init_fsm;
  import sf_pkg::*;
  localparam int unsigned WW = 10;
  logic clk = 0, rst_n = 0, ce = 0;
  logic init_reset = 0, link_start = 0, auto_start = 0, rx_ready = 0, lost_sync = 0;
  logic got_init1 = 0, got_init2 = 0, tx_enable, active;
  li_state_e state;
  tx_sel_e tx_sel;
  int checks = 0, failures = 0;

  link_init_fsm #(.WAIT_WORDS(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word slot every 4th clock
  int cyc = 0;
  always @(posedge clk) begin cyc <= cyc + 1; ce <= ((cyc % 4) == 3); end

  task automatic expect_state(input li_state_e s, input string msg);
    checks++;
    if (state !== s) begin failures++; $display("FAIL %s: state %s expected %s", msg, state.name(), s.name()); end
  endtask

  task automatic pulse(ref logic sig, input int n);
    repeat (n) begin
      @(negedge clk); sig = 1; @(negedge clk); sig = 0; repeat (3) @(negedge clk);
    end
  endtask

  task automatic slots(input int n);
    repeat (n) begin @(posedge clk iff ce); end
    @(negedge clk);
  endtask

  // wait up to max slots for state s
  task automatic wait_state(input li_state_e s, input int max, input string msg);
    int n = 0;
    while (state != s && n <= max) begin @(posedge clk iff ce); n++; end
    @(negedge clk);
    expect_state(s, msg);
  endtask

  int t0, t1;
  initial begin
    link_start = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_state(LI_WARM_RESET, "after reset");
    checks++; if (tx_enable) failures++;
    t0 = cyc;
    wait (state == LI_NOT_CONNECTED); t1 = cyc;
    checks++;
    if ((t1 - t0) < 4 * WW || (t1 - t0) > 4 * WW + 8) begin
      failures++; $display("FAIL warm reset took %0d clocks", t1 - t0);
    end
    @(negedge clk);
    checks++; if (!tx_enable || tx_sel != TXSEL_INIT1) failures++;
    pulse(got_init1, 7);
    expect_state(LI_NOT_CONNECTED, "7 INIT_1");
    pulse(got_init1, 1);
    expect_state(LI_NEAR_END, "8 INIT_1");
    checks++; if (tx_sel != TXSEL_INIT2) failures++;
    pulse(got_init2, 8);
    expect_state(LI_NEAR_END, "INIT_2 received, 16 not yet sent");
    wait_state(LI_CONNECTED, 8, "INIT_2 exchange");
    checks++; if (tx_sel != TXSEL_IDLE) failures++;
    slots(7);
    expect_state(LI_CONNECTED, "7 IDLE");
    wait_state(LI_ACTIVE, 2, "8 IDLE");
    checks++; if (!active || tx_sel != TXSEL_DATA) failures++;
    pulse(lost_sync, 1);
    expect_state(LI_NOT_CONNECTED, "lost sync in Active");
    // far-end path
    pulse(got_init2, 8);
    expect_state(LI_FAR_END, "8 INIT_2");
    checks++; if (tx_sel != TXSEL_INIT2) failures++;
    slots(17);
    expect_state(LI_CONNECTED, "FarEnd sent 16 INIT_2");
    slots(9);
    expect_state(LI_ACTIVE, "Active again");
    pulse(got_init1, 1);
    expect_state(LI_NOT_CONNECTED, "INIT_1 in Active");
    // init_reset and Auto Start
    link_start = 0; auto_start = 1;
    pulse(init_reset, 1);
    expect_state(LI_WARM_RESET, "init_reset");
    slots(WW + 2);
    expect_state(LI_LISTEN, "auto start");
    checks++; if (tx_enable) failures++;
    slots(50);
    expect_state(LI_LISTEN, "still listening");
    pulse(rx_ready, 1);
    expect_state(LI_NOT_CONNECTED, "rx ready in Listen");
    auto_start = 0;
    @(negedge clk); @(negedge clk);
    expect_state(LI_WARM_RESET, "no start");
    slots(WW + 5);
    expect_state(LI_WARM_RESET, "stays in WarmReset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
