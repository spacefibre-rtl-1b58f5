// symbol_sync: comma detection, character realignment and ordered-set
// (word) alignment.
//
// The last two 10-bit groups form a 20-bit window. Each of its ten 10-bit
// slices is checked for the comma pattern 0011111 / 1100000 in its first
// seven bits. A comma selects the slice offset; the 20:10 multiplexer then
// takes every character at that offset until a comma shows up elsewhere
// (comma realignment, cr). Characters are collected four at a time into a
// 40-bit word. A comma always starts a new word, since every ordered set
// begins with K28.5; a comma found anywhere but the first slot of the word
// restarts the word at the comma (also reported as cr).
// The window, comma detect and 20:10 mux follow the alignment-after-
// de-serialisation scheme; the word grouping rule is this design's.
//
// Interface: sym/sym_valid in (from the polarity stage); cd pulses with each
// aligned comma, cr with each realignment; word/word_valid give one aligned
// 40-bit group, first character in bits 39:30; no word is given before the
// first comma. Latency: word_valid follows
// the fourth character's group by two sym_valid strobes.
module symbol_sync
  import sf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  sym,
  input  logic        sym_valid,
  output logic        cd,
  output logic        cr,
  output logic [39:0] word,
  output logic        word_valid
);
  logic [9:0]  prev, cur;
  logic [19:0] win;
  logic [3:0]  off;        // selected slice offset
  logic [1:0]  pos;        // slot of the next character in the word
  logic [29:0] acc;        // characters collected so far
  logic        primed;     // window holds two groups
  logic        sym_valid_d;
  logic        locked;     // a comma has been seen since reset

  logic [9:0]  found;
  logic        any_comma;
  logic [3:0]  comma_off;

  assign win = {prev, cur};

  always_comb begin
    found     = '0;
    any_comma = 1'b0;
    comma_off = off;
    for (int o = 9; o >= 0; o--) begin
      found[o] = has_comma(win[19-o -: 7]);
      if (found[o]) begin
        any_comma = 1'b1;
        comma_off = 4'(o);
      end
    end
  end

  logic [3:0] use_off;
  logic [9:0] ch;
  assign use_off = any_comma ? comma_off : off;
  assign ch      = win[19-use_off -: 10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      cur        <= '0;
      off        <= '0;
      pos        <= '0;
      acc        <= '0;
      primed     <= 1'b0;
      locked     <= 1'b0;
      cd         <= 1'b0;
      cr         <= 1'b0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      cd         <= 1'b0;
      cr         <= 1'b0;
      word_valid <= 1'b0;
      if (sym_valid) begin
        prev   <= cur;
        cur    <= sym;
        primed <= 1'b1;
      end
      // the window changes on the cycle after sym_valid; process it then
      if (primed && sym_valid_d) begin
        if (any_comma) begin
          cd     <= 1'b1;
          locked <= 1'b1;
          off <= comma_off;
          if (comma_off != off || pos != 2'd0) cr <= 1'b1;
          acc[29:20] <= ch;
          pos        <= 2'd1;
        end else begin
          case (pos)
            2'd0: acc[29:20] <= ch;
            2'd1: acc[19:10] <= ch;
            2'd2: acc[9:0]   <= ch;
            default: begin
              word       <= {acc, ch};
              word_valid <= locked;
            end
          endcase
          pos <= pos + 2'd1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sym_valid_d <= 1'b0;
    else        sym_valid_d <= sym_valid;
  end
endmodule
