// vc_flow_control: virtual-channel flow control with flow control tokens.
//
// Sits between the user and the framing layer. A data frame on virtual
// channel v may only start when the far end has granted room for it: each
// FCT ordered set received (K28.5, D0.6, sequence, channel) adds one credit
// to its channel, and starting a frame on a channel uses one. The frame's
// channel is bits 15:8 of its first (header) word; while a channel has no
// credit, User_Txdata_Rdy is held back from the framer, so the framer sends
// idle frames instead. Once a frame has started, its words pass freely.
//
// As destination it sends an FCT whenever the user reports room for one
// more frame in a receive buffer (rx_buffer_free with the channel number);
// requests wait in a small FIFO and go out through the ordered-set path
// ahead of user ordered sets, each with the next sequence number of its
// channel. FCTs received are consumed, other ordered sets pass to the user.
//
// FCT contents, one token per frame of room, and the rule "only send a
// data frame when the destination buffer has room" follow the document.
// This design's choices: credits, sequence numbers and pending FCTs are
// cleared whenever the link is not Active (both ends start again after
// re-initialisation); FCTs are held back for HOLD clocks after the link
// becomes Active, so that the far end has also reached Active and accepts
// them; the credit counter saturates at 2**CREDIT_W-1.
//
// The frame words themselves (fc_txdata) and the read strobe
// (user_txdata_read) pass straight through; only the ready is gated.
//
// Interface: user side txdata/txdata_rdy/txdata_read, tx_ord_set triple,
// rx_ord_set/valid, rx_buffer_free/vc/ready; framer side the same signals
// with prefix fc_. Timing: rdy gating is combinational, counters update on
// the clock edge of the read or of the received FCT.
module vc_flow_control
  import sf_pkg::*;
#(
  parameter int unsigned NUM_VC   = 256,   // channel numbers 0..NUM_VC-1
  parameter int unsigned CREDIT_W = 4,
  parameter int unsigned FIFO     = 8,     // pending FCT requests, power of two
  parameter int unsigned HOLD     = 4096   // clocks after Active before FCTs go out
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        active,
  // user transmit frames
  input  logic [31:0] user_txdata,
  input  logic        user_txdata_rdy,
  output logic        user_txdata_read,
  // to / from the framer
  output logic [31:0] fc_txdata,
  output logic        fc_txdata_rdy,
  input  logic        fc_txdata_read,
  // user transmit ordered sets
  input  logic [31:0] user_tx_ord_set,
  input  logic        user_tx_ord_set_rdy,
  output logic        user_tx_ord_set_read,
  output logic [31:0] fc_tx_ord_set,
  output logic        fc_tx_ord_set_rdy,
  input  logic        fc_tx_ord_set_read,
  // received ordered sets
  input  logic [31:0] fc_rx_ord_set,
  input  logic        fc_rx_ord_set_valid,
  output logic [31:0] user_rx_ord_set,
  output logic        user_rx_ord_set_valid,
  // destination buffer room
  input  logic        rx_buffer_free,
  input  logic [7:0]  rx_buffer_vc,
  output logic        rx_buffer_free_ready,
  // events
  output logic        fct_sent,
  output logic        fct_received,
  output logic        frame_held        // a frame is waiting for credit
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  localparam int unsigned FW = $clog2(FIFO);

  logic [CREDIT_W-1:0] credit [NUM_VC];
  logic [7:0]          seq    [NUM_VC];
  logic [VW-1:0]       fifo   [FIFO];
  logic [FW:0]         wp, rp;
  logic                in_frame;
  logic [7:0]          remaining;
  logic [$clog2(HOLD+1)-1:0] hold;
  logic [VW-1:0]       hdr_vc, rx_vc, head_vc;
  logic                rx_fct, fifo_empty, fifo_full, send_fct, take_credit;

  assign hdr_vc      = VW'(user_txdata[15:8]);
  assign rx_vc       = VW'(fc_rx_ord_set[7:0]);
  assign head_vc     = fifo[rp[FW-1:0]];
  assign fifo_empty  = (wp == rp);
  assign fifo_full   = (wp == {~rp[FW], rp[FW-1:0]});
  assign rx_fct      = fc_rx_ord_set_valid && fc_rx_ord_set[31:16] == {K28_5, OS_FCT};

  // transmit frames: hold back a frame start with no credit
  assign fc_txdata        = user_txdata;
  assign fc_txdata_rdy    = user_txdata_rdy && (in_frame || credit[hdr_vc] != '0);
  assign user_txdata_read = fc_txdata_read;
  assign take_credit      = fc_txdata_read && !in_frame;
  assign frame_held       = user_txdata_rdy && !in_frame && credit[hdr_vc] == '0;

  // ordered sets: pending FCT first
  assign send_fct             = !fifo_empty && hold == ($bits(hold))'(HOLD);
  assign fc_tx_ord_set        = send_fct ? {K28_5, OS_FCT, seq[head_vc], 8'(head_vc)} : user_tx_ord_set;
  assign fc_tx_ord_set_rdy    = send_fct || user_tx_ord_set_rdy;
  assign user_tx_ord_set_read = fc_tx_ord_set_read && !send_fct;
  assign fct_sent             = fc_tx_ord_set_read && send_fct;
  assign rx_buffer_free_ready = active && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) begin
        credit[v] <= '0;
        seq[v]    <= '0;
      end
      for (int i = 0; i < FIFO; i++) fifo[i] <= '0;
      wp                    <= '0;
      rp                    <= '0;
      in_frame              <= 1'b0;
      remaining             <= '0;
      hold                  <= '0;
      user_rx_ord_set       <= '0;
      user_rx_ord_set_valid <= 1'b0;
      fct_received          <= 1'b0;
    end else begin
      user_rx_ord_set_valid <= fc_rx_ord_set_valid && !rx_fct;
      if (fc_rx_ord_set_valid && !rx_fct) user_rx_ord_set <= fc_rx_ord_set;
      fct_received <= rx_fct && active;
      if (!active) begin
        for (int v = 0; v < NUM_VC; v++) begin
          credit[v] <= '0;
          seq[v]    <= '0;
        end
        wp       <= '0;
        rp       <= '0;
        in_frame <= 1'b0;
        hold     <= '0;
      end else begin
        if (hold != ($bits(hold))'(HOLD)) hold <= hold + 1'b1;
        // credits: one in per FCT, one out per frame started
        for (int v = 0; v < NUM_VC; v++) begin
          logic inc, dec;
          inc = rx_fct && rx_vc == VW'(v) && credit[v] != '1;
          dec = take_credit && hdr_vc == VW'(v);
          if (inc && !dec)      credit[v] <= credit[v] + 1'b1;
          else if (dec && !inc) credit[v] <= credit[v] - 1'b1;
        end
        // frame tracking: header word then 'length' data words
        if (fc_txdata_read) begin
          if (!in_frame) begin
            in_frame  <= (user_txdata[7:0] != 8'd0);
            remaining <= user_txdata[7:0];
          end else begin
            remaining <= remaining - 8'd1;
            if (remaining == 8'd1) in_frame <= 1'b0;
          end
        end
        // FCT requests
        if (rx_buffer_free && !fifo_full) begin
          fifo[wp[FW-1:0]] <= VW'(rx_buffer_vc);
          wp <= wp + 1'b1;
        end
        if (fct_sent) begin
          seq[head_vc] <= seq[head_vc] + 8'd1;
          rp <= rp + 1'b1;
        end
      end
    end
  end
endmodule
