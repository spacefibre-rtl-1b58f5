// rx_deframer: receive framing and EMC mitigation.
//
// Takes the data words and ordered sets the link layer passes up and:
//   * separates ordered sets from frame data (the de-multiplexer): any
//     ordered set other than SDF, SIF, EOF and EEF goes out on the receive
//     ordered-set interface (flow control tokens included);
//   * strips the frame delimiters: SDF gives a start-of-frame word
//     {16'h0, VC, word count}, EOF/EEF an end-of-frame word
//     {16'h0, 7'h0, EEF, 7'h0, CRC error};
//   * checks the CRC carried in EOF against the received (scrambled) words;
//   * de-scrambles the data words, with the scrambler reseeded at SDF/SIF;
//   * removes idle frames: their words are checked but never passed on.
// Error outputs pulse for one cycle: out_of_frame_error for a data word or
// EOF outside a frame, an SDF/SIF inside one, or more words than announced;
// frame_length_error for an EOF before the announced number of words;
// crc_error for a CRC mismatch in a data frame. The interface signals follow
// the document; the SOF/EOF word contents and the CRC error flag are this
// design's choices.
//
// Interface: in_word/in_valid from the link layer; user_rx* outputs, all
// registered (one cycle latency).
module rx_deframer
  import sf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sf_word_t    in_word,
  input  logic        in_valid,
  // receive data frame interface
  output logic [31:0] user_rxdata,
  output logic        user_rxdata_sof,
  output logic        user_rxdata_eof,
  output logic        user_rxdata_valid,
  output logic        user_rx_out_of_frame_error,
  output logic        user_frame_length_error,
  output logic        user_rx_crc_error,
  // receive ordered set interface
  output logic [31:0] user_rx_ord_set,
  output logic        user_rx_ord_set_valid,
  // events
  output logic        idle_frame_removed
);
  logic        in_frame, idle_fr;
  logic [7:0]  len, cnt;
  logic [15:0] crc;
  logic [31:0] descr;
  logic        is_sdf, is_sif, is_eof, is_eef, is_data, is_other_os;
  logic        seed, adv, crc_clr, crc_en;

  scrambler u_descr (.clk, .rst_n, .seed, .adv, .din(in_word.d), .dout(descr));
  crc16     u_crc   (.clk, .rst_n, .clr(crc_clr), .en(crc_en), .din(in_word.d), .crc);

  assign is_sdf      = is_os_type(in_word, OS_SDF);
  assign is_sif      = is_os_type(in_word, OS_SIF);
  assign is_eof      = is_os_type(in_word, OS_EOF);
  assign is_eef      = is_os_type(in_word, OS_EEF);
  assign is_data     = (in_word.k == K_DATA);
  assign is_other_os = is_os(in_word) && !(is_sdf || is_sif || is_eof || is_eef);

  logic data_ok, bad_crc;
  assign bad_crc = (crc != in_word.d[15:0]);
  assign data_ok = in_valid && is_data && in_frame && (idle_fr || cnt != len);
  assign seed    = in_valid && (is_sdf || is_sif);
  assign crc_clr = seed;
  assign adv     = data_ok;
  assign crc_en  = data_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame                   <= 1'b0;
      idle_fr                    <= 1'b0;
      len                        <= '0;
      cnt                        <= '0;
      user_rxdata                <= '0;
      user_rxdata_sof            <= 1'b0;
      user_rxdata_eof            <= 1'b0;
      user_rxdata_valid          <= 1'b0;
      user_rx_out_of_frame_error <= 1'b0;
      user_frame_length_error    <= 1'b0;
      user_rx_crc_error          <= 1'b0;
      user_rx_ord_set            <= '0;
      user_rx_ord_set_valid      <= 1'b0;
      idle_frame_removed         <= 1'b0;
    end else begin
      user_rxdata_sof            <= 1'b0;
      user_rxdata_eof            <= 1'b0;
      user_rxdata_valid          <= 1'b0;
      user_rx_out_of_frame_error <= 1'b0;
      user_frame_length_error    <= 1'b0;
      user_rx_crc_error          <= 1'b0;
      user_rx_ord_set_valid      <= 1'b0;
      idle_frame_removed         <= 1'b0;
      if (in_valid) begin
        if (is_sdf || is_sif) begin
          if (in_frame) user_rx_out_of_frame_error <= 1'b1;
          in_frame <= 1'b1;
          idle_fr  <= is_sif;
          len      <= in_word.d[7:0];
          cnt      <= '0;
          if (is_sdf) begin
            user_rxdata       <= {16'h0000, in_word.d[15:0]};
            user_rxdata_sof   <= 1'b1;
            user_rxdata_valid <= 1'b1;
          end
        end else if (is_eof || is_eef) begin
          if (!in_frame) begin
            user_rx_out_of_frame_error <= 1'b1;
          end else begin
            in_frame <= 1'b0;
            if (idle_fr) begin
              idle_frame_removed <= 1'b1;
            end else begin
              user_rxdata       <= {16'h0000, 7'h00, is_eef, 7'h00, bad_crc};
              user_rxdata_eof   <= 1'b1;
              user_rxdata_valid <= 1'b1;
              user_rx_crc_error <= bad_crc;
              if (cnt != len) user_frame_length_error <= 1'b1;
            end
          end
        end else if (is_other_os) begin
          user_rx_ord_set       <= in_word.d;
          user_rx_ord_set_valid <= 1'b1;
        end else if (data_ok) begin
          cnt <= cnt + 8'd1;
          if (!idle_fr) begin
            user_rxdata       <= descr;
            user_rxdata_valid <= 1'b1;
          end
        end else begin
          // data outside a frame, too many words, or a malformed control word
          user_rx_out_of_frame_error <= 1'b1;
        end
      end
    end
  end
endmodule
