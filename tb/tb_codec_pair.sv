// tb_codec_pair: end-to-end test of the SpaceFibre CODEC.
//
// Two CODECs, A and B, are joined by two serial lines; A's local clock is
// 10 ns, B's is slower by 1 % (FULL = 0) or 0.01 % (FULL = 1, default CODEC
// parameters), and each receiver is clocked by the far transmitter's clock,
// as clock recovery would give. The A-to-B line is inverted. A third CODEC,
// C, runs in serial loopback and a fourth, D, in parallel loopback.
//
// Sequence: A uses Link Start, B Auto Start, C Link Start. Once all are
// Active, both ends of the pair and C send random frames and user ordered
// sets. Then three bits on the A-to-B line are corrupted: B must lose
// synchronisation and both ends must go through initialisation again, after
// which traffic resumes. Every mechanism is counted and each one that never
// happened is a failure: Listen, NearEndConnected, polarity correction,
// Active on all four CODECs, frames both ways and in both loopbacks, user ordered
// sets both ways, SKIPs sent, added (at A, whose writer is slower) and
// removed (at B), idle frames cut and removed, FCTs both ways, frames held
// for lack of credit, loss of sync and re-initialisation. Frames must all arrive intact and in order, with no
// CRC, length or out-of-frame error before the line error and at most two
// of each after it.
module tb_codec_pair
  import sf_pkg::*;
#(
  parameter bit FULL = 1'b0
) ();
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime HALF_A = 5.0;
  localparam realtime HALF_B = FULL ? 5.0005 : 5.05;
  localparam int unsigned MAXLEN = FULL ? 255 : 40;
  localparam int unsigned RUN1   = FULL ? 1_000_000 : 120_000;   // clk_a cycles of traffic
  localparam int unsigned RUN2   = FULL ? 300_000 : 60_000;

  logic clk_a = 0, clk_b = 0, rst_n = 0;
  always #(HALF_A) clk_a = ~clk_a;
  always #(HALF_B) clk_b = ~clk_b;

  logic a_tx, b_tx, c_tx, d_tx, flip = 0;
  logic a_start = 0, b_auto = 0, c_start = 0, d_start = 0, send_en = 0, os_req = 0;
  li_state_e a_state, b_state, c_state, d_state;
  logic a_act, b_act, c_act, d_act, a_idle, b_idle, c_idle, d_idle;
  int checks = 0, failures = 0;

  int a_n [26], b_n [26], c_n [26], d_n [26];

  tb_codec_node #(.FULL(FULL), .SEED(8'h0A), .PEER(8'h0B), .MAXLEN(MAXLEN)) a (
    .clk(clk_a), .rx_clk(clk_b), .rst_n, .link_start(a_start), .auto_start(1'b0),
    .init_reset(1'b0), .serial_loopback(1'b0), .parallel_loopback(1'b0), .rx_in(b_tx), .tx_out(a_tx),
    .send_en, .os_req, .link_state(a_state), .link_active(a_act), .tx_idle(a_idle),
    .n_sent(a_n[0]), .n_ok(a_n[1]), .n_bad(a_n[2]), .n_seq(a_n[3]), .n_os_rx(a_n[4]),
    .n_os_bad(a_n[5]), .n_crc(a_n[6]), .n_len(a_n[7]), .n_oof(a_n[8]),
    .n_skip_sent(a_n[9]), .n_skip_added(a_n[10]), .n_skip_removed(a_n[11]),
    .n_cut(a_n[12]), .n_idle_removed(a_n[13]), .n_lost(a_n[14]), .n_invalid(a_n[15]),
    .n_underflow(a_n[16]), .n_overflow(a_n[17]), .n_pol(a_n[18]), .n_near(a_n[19]),
    .n_far(a_n[20]), .n_listen(a_n[21]), .n_active(a_n[22]),
    .n_fct_sent(a_n[23]), .n_fct_rx(a_n[24]), .n_held(a_n[25])
  );

  tb_codec_node #(.FULL(FULL), .SEED(8'h0B), .PEER(8'h0A), .MAXLEN(MAXLEN)) b (
    .clk(clk_b), .rx_clk(clk_a), .rst_n, .link_start(1'b0), .auto_start(b_auto),
    .init_reset(1'b0), .serial_loopback(1'b0), .parallel_loopback(1'b0), .rx_in(~a_tx ^ flip), .tx_out(b_tx),
    .send_en, .os_req, .link_state(b_state), .link_active(b_act), .tx_idle(b_idle),
    .n_sent(b_n[0]), .n_ok(b_n[1]), .n_bad(b_n[2]), .n_seq(b_n[3]), .n_os_rx(b_n[4]),
    .n_os_bad(b_n[5]), .n_crc(b_n[6]), .n_len(b_n[7]), .n_oof(b_n[8]),
    .n_skip_sent(b_n[9]), .n_skip_added(b_n[10]), .n_skip_removed(b_n[11]),
    .n_cut(b_n[12]), .n_idle_removed(b_n[13]), .n_lost(b_n[14]), .n_invalid(b_n[15]),
    .n_underflow(b_n[16]), .n_overflow(b_n[17]), .n_pol(b_n[18]), .n_near(b_n[19]),
    .n_far(b_n[20]), .n_listen(b_n[21]), .n_active(b_n[22]),
    .n_fct_sent(b_n[23]), .n_fct_rx(b_n[24]), .n_held(b_n[25])
  );

  tb_codec_node #(.FULL(FULL), .SEED(8'h0C), .PEER(8'h0C), .MAXLEN(MAXLEN)) c (
    .clk(clk_a), .rx_clk(clk_a), .rst_n, .link_start(c_start), .auto_start(1'b0),
    .init_reset(1'b0), .serial_loopback(1'b1), .parallel_loopback(1'b0), .rx_in(1'b0), .tx_out(c_tx),
    .send_en, .os_req, .link_state(c_state), .link_active(c_act), .tx_idle(c_idle),
    .n_sent(c_n[0]), .n_ok(c_n[1]), .n_bad(c_n[2]), .n_seq(c_n[3]), .n_os_rx(c_n[4]),
    .n_os_bad(c_n[5]), .n_crc(c_n[6]), .n_len(c_n[7]), .n_oof(c_n[8]),
    .n_skip_sent(c_n[9]), .n_skip_added(c_n[10]), .n_skip_removed(c_n[11]),
    .n_cut(c_n[12]), .n_idle_removed(c_n[13]), .n_lost(c_n[14]), .n_invalid(c_n[15]),
    .n_underflow(c_n[16]), .n_overflow(c_n[17]), .n_pol(c_n[18]), .n_near(c_n[19]),
    .n_far(c_n[20]), .n_listen(c_n[21]), .n_active(c_n[22]),
    .n_fct_sent(c_n[23]), .n_fct_rx(c_n[24]), .n_held(c_n[25])
  );

  tb_codec_node #(.FULL(FULL), .SEED(8'h0D), .PEER(8'h0D), .MAXLEN(MAXLEN)) d (
    .clk(clk_a), .rx_clk(clk_a), .rst_n, .link_start(d_start), .auto_start(1'b0),
    .init_reset(1'b0), .serial_loopback(1'b0), .parallel_loopback(1'b1), .rx_in(1'b0), .tx_out(d_tx),
    .send_en, .os_req, .link_state(d_state), .link_active(d_act), .tx_idle(d_idle),
    .n_sent(d_n[0]), .n_ok(d_n[1]), .n_bad(d_n[2]), .n_seq(d_n[3]), .n_os_rx(d_n[4]),
    .n_os_bad(d_n[5]), .n_crc(d_n[6]), .n_len(d_n[7]), .n_oof(d_n[8]),
    .n_skip_sent(d_n[9]), .n_skip_added(d_n[10]), .n_skip_removed(d_n[11]),
    .n_cut(d_n[12]), .n_idle_removed(d_n[13]), .n_lost(d_n[14]), .n_invalid(d_n[15]),
    .n_underflow(d_n[16]), .n_overflow(d_n[17]), .n_pol(d_n[18]), .n_near(d_n[19]),
    .n_far(d_n[20]), .n_listen(d_n[21]), .n_active(d_n[22]),
    .n_fct_sent(d_n[23]), .n_fct_rx(d_n[24]), .n_held(d_n[25])
  );

  initial begin : watchdog
    repeat (FULL ? 6_000_000 : 1_500_000) @(posedge clk_a);
    failures++;
    $display("FAIL watchdog: states %s %s %s", a_state.name(), b_state.name(), c_state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int n);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (%0d)", what, n); end
    else $display("ok   %s (%0d)", what, n);
  endtask

  task automatic traffic(input int unsigned cycles);
    send_en = 1;
    for (int i = 0; i < 4; i++) begin
      repeat (cycles / 4) @(posedge clk_a);
      os_req = 1; @(posedge clk_b); @(posedge clk_b); os_req = 0;
    end
    send_en = 0;
    wait (a_idle && b_idle && c_idle && d_idle);
    repeat (20000) @(posedge clk_a);
  endtask

  int pre [3][9];
  initial begin
    repeat (5) @(posedge clk_a);
    rst_n = 1;
    a_start = 1; b_auto = 1; c_start = 1; d_start = 1;
    fork : bring_up
      wait (a_act && b_act && c_act && d_act);
      begin
        repeat (FULL ? 500_000 : 50_000) @(posedge clk_a);
        failures++;
        $display("FAIL links not Active: states %s %s %s", a_state.name(), b_state.name(), c_state.name());
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_any
    disable bring_up;
    $display("all links Active at %t", $realtime);
    traffic(RUN1);
    for (int i = 0; i < 9; i++) begin pre[0][i] = a_n[i]; pre[1][i] = b_n[i]; pre[2][i] = c_n[i]; end
    for (int i = 6; i <= 8; i++) begin
      chk(a_n[i] == 0 && b_n[i] == 0 && c_n[i] == 0, $sformatf("no receive error %0d before the line error", i),
          a_n[i] + b_n[i] + c_n[i]);
    end
    // three corrupted bits on the A-to-B line
    @(posedge clk_a); #1 flip = 1;
    repeat (3) @(posedge clk_a);
    #1 flip = 0;
    wait (!a_act);
    wait (a_act && b_act);
    $display("link re-initialised at %t", $realtime);
    traffic(RUN2);

    chk(b_n[21] > 0, "B waited in Listen (Auto Start)", b_n[21]);
    chk(a_n[19] + b_n[19] > 0, "NearEndConnected reached", a_n[19] + b_n[19]);
    chk(b_n[18] > 0, "B corrected the inverted line", b_n[18]);
    chk(c_n[22] > 0, "serial loopback CODEC Active", c_n[22]);
    chk(b_n[1] > 0 && b_n[1] == a_n[0], "frames A to B all received", b_n[1]);
    chk(a_n[1] > 0 && a_n[1] == b_n[0], "frames B to A all received", a_n[1]);
    chk(c_n[1] > 0 && c_n[1] == c_n[0], "serial loopback frames all received", c_n[1]);
    chk(d_n[22] > 0, "parallel loopback CODEC Active", d_n[22]);
    chk(d_n[1] > 0 && d_n[1] == d_n[0] && d_n[2] + d_n[3] + d_n[6] + d_n[7] + d_n[8] == 0,
        "parallel loopback frames all received", d_n[1]);
    chk(a_n[2] + b_n[2] + c_n[2] == 0, "no bad frame", a_n[2] + b_n[2] + c_n[2]);
    chk(a_n[3] + b_n[3] + c_n[3] == 0, "frames in order", a_n[3] + b_n[3] + c_n[3]);
    chk(b_n[4] == 8 && a_n[4] == 8 && c_n[4] == 8, "user ordered sets received", a_n[4] + b_n[4] + c_n[4]);
    chk(a_n[5] + b_n[5] + c_n[5] == 0, "no wrong ordered set", a_n[5] + b_n[5] + c_n[5]);
    chk(a_n[9] > 0 && b_n[9] > 0, "SKIPs sent", a_n[9] + b_n[9]);
    chk(a_n[10] > 0, "SKIPs added at A", a_n[10]);
    chk(b_n[11] > 0, "SKIPs removed at B", b_n[11]);
    chk(a_n[12] + b_n[12] > 0, "idle frames cut", a_n[12] + b_n[12]);
    chk(a_n[13] > 0 && b_n[13] > 0, "idle frames removed", a_n[13] + b_n[13]);
    chk(b_n[14] > 0, "B lost synchronisation", b_n[14]);
    chk(a_n[22] >= 2 && b_n[22] >= 2, "link re-initialised", a_n[22]);
    chk(a_n[23] > 0 && b_n[23] > 0 && a_n[24] > 0 && b_n[24] > 0, "FCTs sent and received", a_n[24] + b_n[24]);
    chk(a_n[25] + b_n[25] + c_n[25] > 0, "frames held for flow-control credit", a_n[25] + b_n[25] + c_n[25]);
    chk(a_n[17] + b_n[17] + c_n[17] == 0, "no elastic buffer overflow", a_n[17] + b_n[17]);
    for (int i = 6; i <= 8; i++)
      chk(a_n[i] <= 2 && b_n[i] <= 2 && c_n[i] == 0, $sformatf("receive errors %0d after the line error", i),
          a_n[i] + b_n[i] + c_n[i]);
    $display("frames A->B %0d, B->A %0d, loopback %0d; skips added %0d removed %0d; FarEnd visits %0d",
             b_n[1], a_n[1], c_n[1], a_n[10] + b_n[10], a_n[11] + b_n[11], a_n[20] + b_n[20]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
