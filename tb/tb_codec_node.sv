// tb_codec_node: one SpaceFibre CODEC with a user-side traffic source and
// checker, for the end-to-end testbenches.
//
// FULL = 1 instantiates the CODEC with its default parameters, FULL = 0 with
// a short SKIP interval (50 words) and WarmReset wait (20 words) so that a
// short simulation sees every mechanism.
//
// Source: while send_en is high it offers frames, one after the other with
// random gaps, of 1..MAXLEN words. Word 0 of frame n is {A5, SEED, n} and
// word i a hash of (SEED, n, i), so the far end can check a frame without a
// shared queue. os_req (a pulse) offers one user ordered set {BC, C0, SEED,
// count}. The node grants the far end 4 frames of receive room (FCTs) when
// the link becomes Active and one more for each frame it receives.
// Checker: every received frame must have the PEER's format, the length of
// its SOF, a good CRC and the next frame number; received ordered sets must
// carry PEER. Counts of each kind of result and of the CODEC's event
// outputs are outputs of this module.
module tb_codec_node
  import sf_pkg::*;
#(
  parameter bit          FULL   = 1'b0,
  parameter logic [7:0]  SEED   = 8'h01,
  parameter logic [7:0]  PEER   = 8'h02,
  parameter int unsigned MAXLEN = 40
) (
  input  logic clk,
  input  logic rx_clk,
  input  logic rst_n,
  input  logic link_start,
  input  logic auto_start,
  input  logic init_reset,
  input  logic serial_loopback,
  input  logic parallel_loopback,
  input  logic rx_in,
  output logic tx_out,
  input  logic send_en,
  input  logic os_req,
  output li_state_e link_state,
  output logic link_active,
  output logic tx_idle,
  output int   n_sent, n_ok, n_bad, n_seq, n_os_rx, n_os_bad,
  output int   n_crc, n_len, n_oof, n_skip_sent, n_skip_added, n_skip_removed,
  output int   n_cut, n_idle_removed, n_lost, n_invalid, n_underflow, n_overflow,
  output int   n_pol, n_near, n_far, n_listen, n_active,
  output int   n_fct_sent, n_fct_rx, n_held
);
  logic [31:0] user_txdata, user_tx_ord_set, user_rxdata, user_rx_ord_set;
  logic user_txdata_rdy, user_txdata_read, user_tx_ord_set_rdy, user_tx_ord_set_read;
  logic user_rxdata_sof, user_rxdata_eof, user_rxdata_valid;
  logic user_rx_out_of_frame_error, user_frame_length_error, user_rx_crc_error;
  logic user_rx_ord_set_valid;
  rs_state_e rx_sync_state;
  logic rx_ready, skip_sent, skip_added, skip_removed, rx_overflow, rx_underflow;
  logic rx_invalid_word, rx_idle, rx_skip, rx_lost_sync, tx_disparity, tx_k_error;
  logic idle_frame_cut, idle_frame_removed, data_frame_sent;
  logic [7:0] rx_speed;
  logic rx_buffer_free, rx_buffer_free_ready, fct_sent, fct_received, frame_held;
  logic [7:0] rx_buffer_vc;

  if (FULL) begin : g_dut
    spacefibre_codec dut (.*);
  end else begin : g_dut
    spacefibre_codec #(.SKIP_INTERVAL(50), .WAIT_WORDS(20)) dut (.*);
  end

  function automatic logic [31:0] hash(input logic [7:0] s, input int n, input int i);
    logic [31:0] x;
    x = (32'(s) * 32'h9E37_79B1) ^ (32'(n) * 32'h85EB_CA77) ^ (32'(i) * 32'hC2B2_AE3D);
    x ^= x >> 15;
    x *= 32'h2C1B_3C6D;
    x ^= x >> 12;
    return x;
  endfunction

  // ---------------- source ----------------
  logic [31:0] q [$];
  int gap = 0, fnum = 0, os_cnt = 0;
  always_comb begin
    user_txdata_rdy = q.size() > 0;
    user_txdata     = q.size() > 0 ? q[0] : 32'h0;
  end
  assign tx_idle = (q.size() == 0);
  always @(posedge clk) begin
    if (user_txdata_read) void'(q.pop_front());
    if (send_en && q.size() == 0) begin
      if (gap > 0) gap <= gap - 1;
      else begin
        int len;
        len = $urandom_range(1, MAXLEN);
        q.push_back({16'h0, 8'h00, 8'(len)});
        q.push_back({8'hA5, SEED, 16'(fnum)});
        for (int i = 1; i < len; i++) q.push_back(hash(SEED, fnum, i));
        fnum   <= fnum + 1;
        n_sent <= n_sent + 1;
        gap    <= ($urandom_range(0, 1) != 0) ? $urandom_range(0, 40) : $urandom_range(200, 4000);
      end
    end
    if (user_tx_ord_set_read) user_tx_ord_set_rdy <= 1'b0;
    else if (os_req && !user_tx_ord_set_rdy) begin
      user_tx_ord_set_rdy <= 1'b1;
      user_tx_ord_set     <= {K28_5, 8'hE0, SEED, 8'(os_cnt)};
      os_cnt              <= os_cnt + 1;
    end
  end

  // ---------------- receive buffer credits ----------------
  // 4 frames of room on channel 0 each time the link becomes Active, and
  // one more for every frame taken out
  int  grant = 0;
  logic was_active = 0, held_d = 0;
  assign rx_buffer_vc = 8'd0;
  always_comb rx_buffer_free = (grant > 0) && rx_buffer_free_ready;
  always @(posedge clk) if (rst_n) begin
    was_active <= link_active;
    held_d     <= frame_held;
    if (!link_active) grant <= 0;
    else grant <= grant + ((link_active && !was_active) ? 4 : 0)
                        + ((user_rxdata_valid && user_rxdata_eof) ? 1 : 0)
                        - (rx_buffer_free ? 1 : 0);
    if (fct_sent)                n_fct_sent <= n_fct_sent + 1;
    if (fct_received)            n_fct_rx <= n_fct_rx + 1;
    if (frame_held && !held_d)   n_held <= n_held + 1;
  end

  // ---------------- checker ----------------
  int  len, idx, fn, last_fn = -1;
  bit  in_fr, good;
  always @(posedge clk) if (rst_n) begin
    if (user_rxdata_valid) begin
      if (user_rxdata_sof) begin
        in_fr <= 1; len <= int'(user_rxdata[7:0]); idx <= 0; good <= 1;
      end else if (user_rxdata_eof) begin
        if (in_fr && good && idx == len && !user_rxdata[0]) begin
          n_ok <= n_ok + 1;
          if (fn != last_fn + 1) n_seq <= n_seq + 1;
          last_fn <= fn;
        end else n_bad <= n_bad + 1;
        in_fr <= 0;
      end else begin
        if (idx == 0) begin
          fn <= int'(user_rxdata[15:0]);
          if (user_rxdata[31:16] != {8'hA5, PEER}) good <= 0;
        end else if (user_rxdata != hash(PEER, fn, idx)) good <= 0;
        idx <= idx + 1;
      end
    end
    if (user_rx_ord_set_valid) begin
      if (user_rx_ord_set[31:8] == {K28_5, 8'hE0, PEER}) n_os_rx <= n_os_rx + 1;
      else n_os_bad <= n_os_bad + 1;
    end
    if (user_rx_crc_error)          n_crc <= n_crc + 1;
    if (user_frame_length_error)    n_len <= n_len + 1;
    if (user_rx_out_of_frame_error) n_oof <= n_oof + 1;
    if (skip_sent)                  n_skip_sent <= n_skip_sent + 1;
    if (skip_added)                 n_skip_added <= n_skip_added + 1;
    if (skip_removed)               n_skip_removed <= n_skip_removed + 1;
    if (idle_frame_cut)             n_cut <= n_cut + 1;
    if (idle_frame_removed)         n_idle_removed <= n_idle_removed + 1;
    if (rx_invalid_word)            n_invalid <= n_invalid + 1;
    if (rx_underflow)               n_underflow <= n_underflow + 1;
  end

  // link state visits
  li_state_e prev_state;
  logic      prev_inv;
  always @(posedge clk) if (rst_n) begin
    prev_state <= link_state;
    if (link_state != prev_state) begin
      if (link_state == LI_NEAR_END) n_near   <= n_near + 1;
      if (link_state == LI_FAR_END)  n_far    <= n_far + 1;
      if (link_state == LI_LISTEN)   n_listen <= n_listen + 1;
      if (link_state == LI_ACTIVE)   n_active <= n_active + 1;
    end
  end

  // receive-clock events
  always @(posedge rx_clk) if (rst_n) begin
    prev_inv <= g_dut.dut.u_rx_sync.invert;
    if (g_dut.dut.u_rx_sync.invert != prev_inv) n_pol <= n_pol + 1;
    if (rx_lost_sync) n_lost <= n_lost + 1;
    if (rx_overflow)  n_overflow <= n_overflow + 1;
  end

  initial begin
    n_sent = 0; n_ok = 0; n_bad = 0; n_seq = 0; n_os_rx = 0; n_os_bad = 0;
    n_crc = 0; n_len = 0; n_oof = 0; n_skip_sent = 0; n_skip_added = 0;
    n_skip_removed = 0; n_cut = 0; n_idle_removed = 0; n_lost = 0; n_invalid = 0;
    n_underflow = 0; n_overflow = 0; n_pol = 0; n_near = 0; n_far = 0;
    n_listen = 0; n_active = 0; n_fct_sent = 0; n_fct_rx = 0; n_held = 0;
    user_tx_ord_set_rdy = 0; user_tx_ord_set = '0;
    prev_state = LI_WARM_RESET; prev_inv = 0; in_fr = 0; good = 0;
    len = 0; idx = 0; fn = 0;
  end
endmodule
