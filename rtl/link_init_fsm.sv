// link_init_fsm: link initialisation state machine.
//
// States and transitions (from the document's state diagram and sequence
// charts):
//   WarmReset     -> NotConnected after the 10 us wait when link_start is set,
//                    -> Listen after the wait when only auto_start is set;
//   Listen        -> NotConnected once the receiver is synchronised;
//   NotConnected  sends INIT_1; 8 INIT_1 received -> NearEndConnected,
//                    8 INIT_2 received -> FarEndConnected, neither start
//                    nor auto-start -> WarmReset;
//   NearEndConnected sends INIT_2; 8 INIT_2 received -> Connected;
//   FarEndConnected  sends 16 INIT_2 -> Connected;
//   Connected     sends 8 IDLE -> Active;
//   Active        framed data flows.
// Choices of this design where the diagram is silent: the transmitter is
// quiet in WarmReset and Listen; NearEndConnected also waits until it has
// sent 16 INIT_2; loss of receiver synchronisation after NotConnected, or an
// INIT_1 received in Connected or Active, goes back to NotConnected
// (re-initialisation); init_reset forces WarmReset. Received INITs are
// counted as they arrive, sent words on each word slot (ce).
//
// Interface: ce, control inputs, rx events (pulses); state, tx_sel,
// tx_enable, active out.
module link_init_fsm
  import sf_pkg::*;
#(
  parameter int unsigned WAIT_WORDS = 500   // 10 us at 2 Gbit/s, 40 bits per word
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      init_reset,
  input  logic      link_start,
  input  logic      auto_start,
  input  logic      rx_ready,
  input  logic      lost_sync,
  input  logic      got_init1,
  input  logic      got_init2,
  output li_state_e state,
  output tx_sel_e   tx_sel,
  output logic      tx_enable,
  output logic      active
);
  logic [$clog2(WAIT_WORDS+1)-1:0] timer;
  logic [3:0] n_rx1, n_rx2;   // saturate at 8
  logic [4:0] n_tx;           // saturate at 16
  li_state_e  nxt;

  assign active    = (state == LI_ACTIVE);
  assign tx_enable = !(state == LI_WARM_RESET || state == LI_LISTEN);

  always_comb begin
    unique case (state)
      LI_NOT_CONNECTED:          tx_sel = TXSEL_INIT1;
      LI_NEAR_END, LI_FAR_END:   tx_sel = TXSEL_INIT2;
      LI_ACTIVE:                 tx_sel = TXSEL_DATA;
      default:                   tx_sel = TXSEL_IDLE;
    endcase
  end

  always_comb begin
    nxt = state;
    unique case (state)
      LI_WARM_RESET:
        if (timer == ($bits(timer))'(WAIT_WORDS)) begin
          if (link_start)      nxt = LI_NOT_CONNECTED;
          else if (auto_start) nxt = LI_LISTEN;
        end
      LI_LISTEN:
        if (!link_start && !auto_start) nxt = LI_WARM_RESET;
        else if (rx_ready)              nxt = LI_NOT_CONNECTED;
      LI_NOT_CONNECTED:
        if (!link_start && !auto_start) nxt = LI_WARM_RESET;
        else if (n_rx1 == 4'd8)         nxt = LI_NEAR_END;
        else if (n_rx2 == 4'd8)         nxt = LI_FAR_END;
      LI_NEAR_END:
        if (n_rx2 == 4'd8 && n_tx == 5'd16) nxt = LI_CONNECTED;
      LI_FAR_END:
        if (n_tx == 5'd16)              nxt = LI_CONNECTED;
      LI_CONNECTED:
        if (got_init1)                  nxt = LI_NOT_CONNECTED;
        else if (n_tx == 5'd8)          nxt = LI_ACTIVE;
      LI_ACTIVE:
        if (got_init1)                  nxt = LI_NOT_CONNECTED;
      default:                          nxt = LI_WARM_RESET;
    endcase
    if (lost_sync && state inside {LI_NEAR_END, LI_FAR_END, LI_CONNECTED, LI_ACTIVE})
      nxt = LI_NOT_CONNECTED;
    if (init_reset) nxt = LI_WARM_RESET;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LI_WARM_RESET;
      timer <= '0;
      n_rx1 <= '0;
      n_rx2 <= '0;
      n_tx  <= '0;
    end else begin
      state <= nxt;
      if (nxt != state) begin
        timer <= '0;
        n_rx1 <= '0;
        n_rx2 <= '0;
        n_tx  <= '0;
      end else begin
        if (ce && state == LI_WARM_RESET && timer != ($bits(timer))'(WAIT_WORDS))
          timer <= timer + 1'b1;
        if (got_init1 && n_rx1 != 4'd8) n_rx1 <= n_rx1 + 4'd1;
        if (got_init2 && n_rx2 != 4'd8) n_rx2 <= n_rx2 + 4'd1;
        if (ce && n_tx != 5'd16) n_tx <= n_tx + 5'd1;
      end
    end
  end
endmodule
