// spacefibre_codec: SpaceFibre CODEC, lane and framing layers, from the
// user data interface to the serial line.
//
// Transmit (local bit clock clk): a word slot (ce) comes every 40 bit
// clocks. tx_framer builds data frames (SDF, scrambled data, EOF with CRC)
// and idle frames (SIF, scrambled zeros, EOF) from the user interface;
// tx_link_mux puts SKIPs in at the set interval and, outside the Active
// state, the INIT_1 / INIT_2 / IDLE words the link_init_fsm asks for;
// word_encoder turns each word into four 8B/10B symbols and the serialiser
// sends them, first bit first, while the state machine enables the
// transmitter.
//
// Receive (recovered bit clock rx_clk, from the external clock recovery):
// deserialiser -> rx_polarity -> symbol_sync (comma alignment) ->
// word_decoder -> rx_sync_fsm (SymbolSync / CheckSync / Ready, flips the
// polarity when needed). Once Ready, decoded words go into the elastic
// buffer, which moves them to clk and adds or removes SKIPs. link_os_rx
// picks out INIT_1, INIT_2, IDLE and SKIP for the link state machine and,
// in the Active state, passes the rest to rx_deframer, which de-scrambles,
// checks the CRC and frame length, drops idle frames and splits the user
// data and ordered-set outputs. vc_flow_control, between the user and the
// framing, holds back a data frame until the far end has granted room for it
// with an FCT, and sends FCTs when the user reports receive buffer room.
//
// Clock crossing: only the elastic buffer, the receive Ready level and the
// reset cross between clk and rx_clk, each through two flip-flops. Loss of
// synchronisation reaches the link state machine as the fall of the
// synchronised Ready. rx_overflow is a rx_clk pulse; all other outputs are
// in the clk domain. With serial_loopback set the receive input is the own
// transmit output; with parallel_loopback set the receive path takes the
// encoded symbols straight from the transmitter, bypassing serialiser and
// deserialiser. In both modes rx_clk must be driven from clk, as the clock
// recovery would do.
//
// The receive reset is asserted at once and released two rx_clk edges after
// rst_n, through the rx_rst_sr flip-flops; their output is the asynchronous
// reset of the receive logic, so a lint tool reports rx_rst_sr as used both
// as data and as a reset. That is the intended reset synchroniser.
//
// Follows the document: the layer split, ordered sets, SKIP handling, state
// machines, FCT flow control and user signal names. This design's choices: one serial lane,
// the 40-bit word slot, the loopback points, the status outputs.
module spacefibre_codec
  import sf_pkg::*;
#(
  parameter int unsigned SKIP_INTERVAL = 5000,
  parameter int unsigned WAIT_WORDS    = 500,
  parameter int unsigned CHECK_COMMAS  = 4,
  parameter int unsigned EB_DEPTH      = 16,
  parameter logic [7:0]  SPEED         = 8'h00,
  parameter int unsigned NUM_VC        = 256,
  parameter int unsigned FCT_HOLD      = 4096
) (
  input  logic        clk,            // local bit clock
  input  logic        rst_n,          // asynchronous reset, both domains
  input  logic        rx_clk,         // recovered receive bit clock

  // link control
  input  logic        link_start,
  input  logic        auto_start,
  input  logic        init_reset,
  input  logic        serial_loopback,
  input  logic        parallel_loopback,

  // serial line
  output logic        tx_out,
  input  logic        rx_in,

  // user transmit interface
  input  logic [31:0] user_txdata,
  input  logic        user_txdata_rdy,
  output logic        user_txdata_read,
  input  logic [31:0] user_tx_ord_set,
  input  logic        user_tx_ord_set_rdy,
  output logic        user_tx_ord_set_read,

  // user receive interface
  output logic [31:0] user_rxdata,
  output logic        user_rxdata_sof,
  output logic        user_rxdata_eof,
  output logic        user_rxdata_valid,
  output logic        user_rx_out_of_frame_error,
  output logic        user_frame_length_error,
  output logic        user_rx_crc_error,
  output logic [31:0] user_rx_ord_set,
  output logic        user_rx_ord_set_valid,

  // flow control: receive buffer room for one more frame on a channel
  input  logic        rx_buffer_free,
  input  logic [7:0]  rx_buffer_vc,
  output logic        rx_buffer_free_ready,

  // status
  output li_state_e   link_state,
  output rs_state_e   rx_sync_state,  // rx_clk domain
  output logic        link_active,
  output logic        rx_ready,
  output logic [7:0]  rx_speed,
  output logic        skip_sent,
  output logic        skip_added,
  output logic        skip_removed,
  output logic        rx_overflow,    // rx_clk domain
  output logic        rx_underflow,
  output logic        rx_invalid_word,
  output logic        rx_idle,        // IDLE received
  output logic        rx_skip,        // SKIP received (after the elastic buffer)
  output logic        rx_lost_sync,   // rx_clk domain pulse
  output logic        tx_disparity,   // running disparity after the last word
  output logic        tx_k_error,     // a user word asked for a K code that does not exist
  output logic        idle_frame_cut,
  output logic        idle_frame_removed,
  output logic        data_frame_sent,
  output logic        fct_sent,
  output logic        fct_received,
  output logic        frame_held      // a user frame waits for flow-control credit
);
  // ---------------------------------------------------------------- resets
  logic [1:0] rx_rst_sr;
  logic       rx_rst_n;
  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) rx_rst_sr <= '0;
    else        rx_rst_sr <= {rx_rst_sr[0], 1'b1};
  end
  assign rx_rst_n = rx_rst_sr[1];

  // ---------------------------------------------------------- word slots
  logic [5:0] bit_cnt;
  logic       ce, load;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               bit_cnt <= '0;
    else if (bit_cnt == 6'd39) bit_cnt <= '0;
    else                      bit_cnt <= bit_cnt + 6'd1;
  end
  assign ce   = (bit_cnt == 6'd0);
  assign load = (bit_cnt == 6'd39);

  // ------------------------------------------------------------- transmit
  tx_sel_e     tx_sel;
  logic        tx_enable;
  sf_word_t    fr_word, tx_word;
  logic        fr_valid, fr_take;
  logic [39:0] tx_code;
  logic        got_init1, got_init2;
  logic        rx_lost;

  link_init_fsm #(.WAIT_WORDS(WAIT_WORDS)) u_link_init (
    .clk, .rst_n, .ce, .init_reset, .link_start, .auto_start,
    .rx_ready, .lost_sync(rx_lost), .got_init1, .got_init2,
    .state(link_state), .tx_sel, .tx_enable, .active(link_active)
  );

  logic [31:0] fc_txdata, fc_tx_ord_set, fc_rx_ord_set;
  logic        fc_txdata_rdy, fc_txdata_read, fc_tx_ord_set_rdy, fc_tx_ord_set_read;
  logic        fc_rx_ord_set_valid;

  vc_flow_control #(.NUM_VC(NUM_VC), .HOLD(FCT_HOLD)) u_flow (
    .clk, .rst_n, .active(link_active),
    .user_txdata, .user_txdata_rdy, .user_txdata_read,
    .fc_txdata, .fc_txdata_rdy, .fc_txdata_read,
    .user_tx_ord_set, .user_tx_ord_set_rdy, .user_tx_ord_set_read,
    .fc_tx_ord_set, .fc_tx_ord_set_rdy, .fc_tx_ord_set_read,
    .fc_rx_ord_set, .fc_rx_ord_set_valid, .user_rx_ord_set, .user_rx_ord_set_valid,
    .rx_buffer_free, .rx_buffer_vc, .rx_buffer_free_ready,
    .fct_sent, .fct_received, .frame_held
  );

  tx_framer u_tx_framer (
    .clk, .rst_n, .active(link_active),
    .user_txdata(fc_txdata), .user_txdata_rdy(fc_txdata_rdy), .user_txdata_read(fc_txdata_read),
    .user_tx_ord_set(fc_tx_ord_set), .user_tx_ord_set_rdy(fc_tx_ord_set_rdy),
    .user_tx_ord_set_read(fc_tx_ord_set_read),
    .out_word(fr_word), .out_valid(fr_valid), .take(fr_take),
    .idle_frame_cut, .data_frame_sent
  );

  tx_link_mux #(.SKIP_INTERVAL(SKIP_INTERVAL), .SPEED(SPEED)) u_tx_mux (
    .clk, .rst_n, .ce, .tx_sel, .up_word(fr_word), .up_valid(fr_valid),
    .up_take(fr_take), .word_out(tx_word), .skip_sent
  );

  word_encoder u_encoder (
    .clk, .rst_n, .ce, .word_in(tx_word), .code_out(tx_code), .rd(tx_disparity), .k_err(tx_k_error)
  );

  serialiser #(.WORD_BITS(40)) u_serialiser (
    .clk, .rst_n, .load, .word(tx_code), .enable(tx_enable), .sout(tx_out)
  );

  // -------------------------------------------------------------- receive
  logic        line_in;
  logic [9:0]  des_sym, pol_sym;
  logic        des_valid, pol_valid;
  logic        cd, cr, sym_word_valid;
  logic [39:0] sym_word;
  sf_word_t    dec_word;
  logic        dec_invalid, dec_valid;
  logic        rs_ready, rs_invert;
  rx_word_t    eb_in, eb_out;
  logic        eb_valid;

  assign line_in = serial_loopback ? tx_out : rx_in;

  deserialiser u_deserialiser (
    .clk(rx_clk), .rst_n(rx_rst_n), .sin(line_in), .sym(des_sym), .sym_valid(des_valid)
  );

  // parallel loopback: the encoded word being sent, one 10-bit symbol every
  // 10 clocks, in place of the deserialiser output
  logic [39:0] lb_word;
  logic [9:0]  rx_sym;
  logic        rx_sym_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lb_word <= '0;
    else if (load) lb_word <= tx_enable ? tx_code : 40'h0;
  end
  always_comb begin
    rx_sym       = des_sym;
    rx_sym_valid = des_valid;
    if (parallel_loopback) begin
      unique case (bit_cnt)
        6'd9:    rx_sym = lb_word[39:30];
        6'd19:   rx_sym = lb_word[29:20];
        6'd29:   rx_sym = lb_word[19:10];
        default: rx_sym = lb_word[9:0];
      endcase
      rx_sym_valid = (bit_cnt == 6'd9) || (bit_cnt == 6'd19) || (bit_cnt == 6'd29) ||
                     (bit_cnt == 6'd39);
    end
  end

  rx_polarity u_polarity (
    .clk(rx_clk), .rst_n(rx_rst_n), .sym_in(rx_sym), .sym_in_valid(rx_sym_valid),
    .invert(rs_invert), .sym_out(pol_sym), .sym_out_valid(pol_valid)
  );

  symbol_sync u_symbol_sync (
    .clk(rx_clk), .rst_n(rx_rst_n), .sym(pol_sym), .sym_valid(pol_valid),
    .cd, .cr, .word(sym_word), .word_valid(sym_word_valid)
  );

  word_decoder u_decoder (
    .clk(rx_clk), .rst_n(rx_rst_n), .ce(sym_word_valid), .code_in(sym_word),
    .word_out(dec_word), .invalid(dec_invalid), .valid_out(dec_valid)
  );

  rx_sync_fsm #(.CHECK_COMMAS(CHECK_COMMAS)) u_rx_sync (
    .clk(rx_clk), .rst_n(rx_rst_n), .cd, .cr, .dec_valid,
    .dec_invalid(dec_valid && dec_invalid),
    .ready(rs_ready), .lost_sync(rx_lost_sync), .invert(rs_invert), .state(rx_sync_state)
  );

  assign eb_in = '{invalid: dec_invalid, w: dec_word};

  elastic_buffer #(.DEPTH(EB_DEPTH)) u_elastic (
    .wr_clk(rx_clk), .wr_rst_n(rx_rst_n), .wr_en(dec_valid && rs_ready),
    .wr_data(eb_in), .overflow(rx_overflow),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_slot(ce),
    .rd_data(eb_out), .rd_valid(eb_valid),
    .skip_added, .skip_removed, .underflow(rx_underflow)
  );

  // receive Ready into the local clock domain; its fall is a loss of sync
  logic [2:0] ready_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_sr <= '0;
    else        ready_sr <= {ready_sr[1:0], rs_ready};
  end
  assign rx_ready = ready_sr[1];
  assign rx_lost  = ready_sr[2] && !ready_sr[1];

  sf_word_t os_up_word;
  logic     os_up_valid;

  link_os_rx u_link_os_rx (
    .clk, .rst_n, .in_word(eb_out), .in_valid(eb_valid), .pass_en(link_active),
    .got_init1, .got_init2, .got_idle(rx_idle), .got_skip(rx_skip), .got_invalid(rx_invalid_word),
    .rx_speed, .up_word(os_up_word), .up_valid(os_up_valid)
  );

  rx_deframer u_rx_deframer (
    .clk, .rst_n, .in_word(os_up_word), .in_valid(os_up_valid),
    .user_rxdata, .user_rxdata_sof, .user_rxdata_eof, .user_rxdata_valid,
    .user_rx_out_of_frame_error, .user_frame_length_error, .user_rx_crc_error,
    .user_rx_ord_set(fc_rx_ord_set), .user_rx_ord_set_valid(fc_rx_ord_set_valid),
    .idle_frame_removed
  );
endmodule
