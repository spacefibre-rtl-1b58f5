// rx_sync_fsm: receiver synchronisation state machine.
//
// SymbolSync: wait for a comma. CheckSync: after a comma has set the
// alignment, count further aligned commas; CHECK_COMMAS of them with no
// realignment and no invalid decoded word give Ready. A realignment in
// CheckSync returns to SymbolSync; an invalid word there also flips the
// receive polarity, since an inverted stream still shows commas but its data
// characters do not decode. In Ready any realignment or invalid word is a
// loss of synchronisation: lost_sync pulses and the machine returns to
// SymbolSync, which makes the link initialisation restart. The state names
// and the lost-sync report follow the document; the counts and the polarity
// rule are this design's choices.
//
// Interface (receive clock domain): cd, cr from symbol_sync; dec_valid and
// dec_invalid from the word decoder. Out: ready, lost_sync, invert, state.
module rx_sync_fsm
  import sf_pkg::*;
#(
  parameter int unsigned CHECK_COMMAS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cd,
  input  logic      cr,
  input  logic      dec_valid,
  input  logic      dec_invalid,
  output logic      ready,
  output logic      lost_sync,
  output logic      invert,
  output rs_state_e state
);
  logic [$clog2(CHECK_COMMAS+1)-1:0] good;
  logic first_word;   // first decoded word after alignment may carry an old disparity

  assign ready = (state == RS_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RS_SYMBOL_SYNC;
      good       <= '0;
      lost_sync  <= 1'b0;
      invert     <= 1'b0;
      first_word <= 1'b0;
    end else begin
      lost_sync <= 1'b0;
      unique case (state)
        RS_SYMBOL_SYNC: begin
          if (cd) begin
            state      <= RS_CHECK_SYNC;
            good       <= '0;
            first_word <= 1'b1;
          end
        end
        RS_CHECK_SYNC: begin
          if (dec_valid) first_word <= 1'b0;
          if (cr) begin
            state <= RS_SYMBOL_SYNC;
          end else if (dec_valid && dec_invalid && !first_word) begin
            state  <= RS_SYMBOL_SYNC;
            invert <= ~invert;
          end else if (cd) begin
            if (good == ($bits(good))'(CHECK_COMMAS - 1)) state <= RS_READY;
            else good <= good + 1'b1;
          end
        end
        RS_READY: begin
          if (cr || (dec_valid && dec_invalid)) begin
            state     <= RS_SYMBOL_SYNC;
            lost_sync <= 1'b1;
          end
        end
        default: state <= RS_SYMBOL_SYNC;
      endcase
    end
  end
endmodule
