// tx_framer: transmit framing and EMC mitigation.
//
// Builds the word stream handed to the link layer in the Active state:
//   * data frame: SDF (K28.5, D0.2, VC, word count), the user's words
//     scrambled, then EOF (K28.5, D0.4, CRC MS, CRC LS);
//   * idle frame when the user has no frame ready: SIF (K28.5, D0.3, 0, 255)
//     and up to 255 scrambled all-zero idle words, cut short by EOF as soon
//     as a user frame is ready;
//   * user ordered sets, sent in the next word slot whenever one is
//     offered, also between the words of a frame.
// The scrambler is reseeded at every SDF/SIF and steps only on frame data
// words; the CRC covers the scrambled data words between SOF and EOF. Frame
// formats, interface signals and idle-frame rules follow the document. The
// user presents a frame first-word-fall-through: the first word's low byte
// is the word count (0..255) and, this design's choice, bits 15:8 the
// virtual channel; User_Txdata_Read consumes the shown word. Priority of
// user ordered sets over frame words is also this design's choice.
//
// Interface: user side txdata/txdata_rdy/txdata_read and txos/txos_rdy/
// txos_read; link side out_word/out_valid and take (word consumed this
// cycle). active low (link not Active) abandons the frame in progress.
// out_valid is the active input itself: in the Active state the framer
// always has a word to offer (frame word, idle word or ordered set).
module tx_framer
  import sf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        active,
  // user transmit data frame interface
  input  logic [31:0] user_txdata,
  input  logic        user_txdata_rdy,
  output logic        user_txdata_read,
  // user transmit ordered set interface
  input  logic [31:0] user_tx_ord_set,
  input  logic        user_tx_ord_set_rdy,
  output logic        user_tx_ord_set_read,
  // to the link layer
  output sf_word_t    out_word,
  output logic        out_valid,
  input  logic        take,
  // events
  output logic        idle_frame_cut,   // an idle frame was ended early
  output logic        data_frame_sent   // EOF of a data frame sent
);
  typedef enum logic [1:0] {F_GAP, F_DATA, F_IDLEW, F_EOF} fstate_e;
  fstate_e     st;
  logic [7:0]  len, cnt;
  logic        idle_fr;
  logic [15:0] crc;
  logic [31:0] scr_in, scr_out;
  logic        scr_seed, scr_adv, crc_clr, crc_en;
  logic        os_slot;

  scrambler u_scr (.clk, .rst_n, .seed(scr_seed), .adv(scr_adv), .din(scr_in), .dout(scr_out));
  crc16     u_crc (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(scr_out), .crc);

  assign os_slot   = user_tx_ord_set_rdy;
  assign out_valid = active;
  assign scr_in    = (st == F_DATA) ? user_txdata : 32'h0000_0000;

  logic idle_end;
  assign idle_end = user_txdata_rdy || (cnt == 8'(MAX_FRAME_WORDS));

  always_comb begin
    out_word             = make_os(OS_IDLE, D0_0, D0_0);
    user_txdata_read     = 1'b0;
    user_tx_ord_set_read = 1'b0;
    scr_seed             = 1'b0;
    scr_adv              = 1'b0;
    crc_clr              = 1'b0;
    crc_en               = 1'b0;
    if (os_slot) begin
      out_word.k           = K_OS;
      out_word.d           = user_tx_ord_set;
      user_tx_ord_set_read = take;
    end else begin
      unique case (st)
        F_GAP: begin
          crc_clr  = take;
          scr_seed = take;
          if (user_txdata_rdy) begin
            out_word         = make_os(OS_SDF, user_txdata[15:8], user_txdata[7:0]);
            user_txdata_read = take;
          end else begin
            out_word = make_os(OS_SIF, 8'h00, 8'hFF);
          end
        end
        F_DATA: begin
          out_word.k       = K_DATA;
          out_word.d       = scr_out;
          user_txdata_read = take;
          scr_adv          = take;
          crc_en           = take;
        end
        F_IDLEW: begin
          if (idle_end) begin
            out_word = make_os(OS_EOF, crc[15:8], crc[7:0]);
          end else begin
            out_word.k = K_DATA;
            out_word.d = scr_out;
            scr_adv    = take;
            crc_en     = take;
          end
        end
        default: out_word = make_os(OS_EOF, crc[15:8], crc[7:0]);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= F_GAP;
      len             <= '0;
      cnt             <= '0;
      idle_fr         <= 1'b0;
      idle_frame_cut  <= 1'b0;
      data_frame_sent <= 1'b0;
    end else begin
      idle_frame_cut  <= 1'b0;
      data_frame_sent <= 1'b0;
      if (!active) begin
        st <= F_GAP;
      end else if (take && !os_slot) begin
        unique case (st)
          F_GAP: begin
            cnt <= '0;
            if (user_txdata_rdy) begin
              len     <= user_txdata[7:0];
              idle_fr <= 1'b0;
              st      <= (user_txdata[7:0] == 8'd0) ? F_EOF : F_DATA;
            end else begin
              idle_fr <= 1'b1;
              st      <= F_IDLEW;
            end
          end
          F_DATA: begin
            cnt <= cnt + 8'd1;
            if (cnt + 8'd1 == len) st <= F_EOF;
          end
          F_IDLEW: begin
            if (idle_end) begin
              st             <= F_GAP;
              idle_frame_cut <= user_txdata_rdy && (cnt != 8'(MAX_FRAME_WORDS));
            end else begin
              cnt <= cnt + 8'd1;
            end
          end
          default: begin
            st              <= F_GAP;
            data_frame_sent <= !idle_fr;
          end
        endcase
      end
    end
  end
endmodule
