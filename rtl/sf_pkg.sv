// sf_pkg: types and constants shared by the SpaceFibre CODEC.
//
// A link word is 32 data bits plus 4 K (control) flags, one per byte; byte 3
// (bits 31:24) is sent first. Every ordered set is a word whose byte 3 is the
// comma K28.5 and whose byte 2 names the ordered set. The ordered-set codes
// (SKIP D0.0, IDLE D0.1, SDF D0.2, SIF D0.3, EOF D0.4, EEF D0.5, FCT D0.6,
// INIT D10.2) follow the SpaceFibre ordered-set tables. The 10-bit code layout
// {a,b,c,d,e,i,f,g,h,j} with bit 9 = a sent first is this design's choice.
// Each constant is used by at least one block. A block that uses only some of
// them reports the rest as unused parameters when it is linted on its own.
package sf_pkg;

  // 8-bit values of the named characters (D/Kxx.y = {y[2:0], xx[4:0]})
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] D0_0  = 8'h00;
  localparam logic [7:0] D0_1  = 8'h20;
  localparam logic [7:0] D0_2  = 8'h40;
  localparam logic [7:0] D0_3  = 8'h60;
  localparam logic [7:0] D0_4  = 8'h80;
  localparam logic [7:0] D0_5  = 8'hA0;
  localparam logic [7:0] D0_6  = 8'hC0;
  localparam logic [7:0] D10_2 = 8'h4A;

  // ordered-set type byte (byte 2)
  localparam logic [7:0] OS_SKIP = D0_0;
  localparam logic [7:0] OS_IDLE = D0_1;
  localparam logic [7:0] OS_SDF  = D0_2;
  localparam logic [7:0] OS_SIF  = D0_3;
  localparam logic [7:0] OS_EOF  = D0_4;
  localparam logic [7:0] OS_EEF  = D0_5;
  localparam logic [7:0] OS_FCT  = D0_6;
  localparam logic [7:0] OS_INIT = D10_2;

  localparam logic [3:0] K_OS   = 4'b1000;  // K flags of an ordered set
  localparam logic [3:0] K_DATA = 4'b0000;  // K flags of a data word

  // maximum words in a data or idle frame
  localparam int unsigned MAX_FRAME_WORDS = 255;

  // one link word: K flags and data
  typedef struct packed {
    logic [3:0]  k;
    logic [31:0] d;
  } sf_word_t;

  // word as held in the receive elastic buffer: word plus decode error
  typedef struct packed {
    logic     invalid;
    sf_word_t w;
  } rx_word_t;

  // what the link layer sends in a word slot (link initialisation)
  typedef enum logic [1:0] {
    TXSEL_INIT1 = 2'd0,
    TXSEL_INIT2 = 2'd1,
    TXSEL_IDLE  = 2'd2,
    TXSEL_DATA  = 2'd3
  } tx_sel_e;

  // link initialisation states (named as in the SpaceFibre state diagram)
  typedef enum logic [2:0] {
    LI_WARM_RESET    = 3'd0,
    LI_LISTEN        = 3'd1,
    LI_NOT_CONNECTED = 3'd2,
    LI_NEAR_END      = 3'd3,
    LI_FAR_END       = 3'd4,
    LI_CONNECTED     = 3'd5,
    LI_ACTIVE        = 3'd6
  } li_state_e;

  // receiver synchronisation states
  typedef enum logic [1:0] {
    RS_SYMBOL_SYNC = 2'd0,
    RS_CHECK_SYNC  = 2'd1,
    RS_READY       = 2'd2
  } rs_state_e;

  function automatic sf_word_t make_os(input logic [7:0] typ, input logic [7:0] b1,
                                       input logic [7:0] b0);
    sf_word_t w;
    w.k = K_OS;
    w.d = {K28_5, typ, b1, b0};
    return w;
  endfunction

  function automatic logic is_os(input sf_word_t w);
    return (w.k == K_OS) && (w.d[31:24] == K28_5);
  endfunction

  function automatic logic is_os_type(input sf_word_t w, input logic [7:0] typ);
    return is_os(w) && (w.d[23:16] == typ);
  endfunction

  // ---------------------------------------------------------------------------
  // 8B/10B encoding. The 5B/6B and 3B/4B tables are the standard ones; only the
  // value for negative running disparity is tabulated, the positive one is its
  // complement where the sub-block is unbalanced (and for D.7 / x.3 / K forms).
  // ---------------------------------------------------------------------------
  function automatic logic [5:0] tab6(input logic [4:0] x);
    logic [5:0] r;
    case (x)
      5'd0:  r = 6'b100111;  5'd1:  r = 6'b011101;  5'd2:  r = 6'b101101;
      5'd3:  r = 6'b110001;  5'd4:  r = 6'b110101;  5'd5:  r = 6'b101001;
      5'd6:  r = 6'b011001;  5'd7:  r = 6'b111000;  5'd8:  r = 6'b111001;
      5'd9:  r = 6'b100101;  5'd10: r = 6'b010101;  5'd11: r = 6'b110100;
      5'd12: r = 6'b001101;  5'd13: r = 6'b101100;  5'd14: r = 6'b011100;
      5'd15: r = 6'b010111;  5'd16: r = 6'b011011;  5'd17: r = 6'b100011;
      5'd18: r = 6'b010011;  5'd19: r = 6'b110010;  5'd20: r = 6'b001011;
      5'd21: r = 6'b101010;  5'd22: r = 6'b011010;  5'd23: r = 6'b111010;
      5'd24: r = 6'b110011;  5'd25: r = 6'b100110;  5'd26: r = 6'b010110;
      5'd27: r = 6'b110110;  5'd28: r = 6'b001110;  5'd29: r = 6'b101110;
      5'd30: r = 6'b011110;  default: r = 6'b101011;
    endcase
    return r;
  endfunction

  function automatic logic [3:0] tab4d(input logic [2:0] y);
    logic [3:0] r;
    case (y)
      3'd0: r = 4'b1011;  3'd1: r = 4'b1001;  3'd2: r = 4'b0101;  3'd3: r = 4'b1100;
      3'd4: r = 4'b1101;  3'd5: r = 4'b1010;  3'd6: r = 4'b0110;  default: r = 4'b1110;
    endcase
    return r;
  endfunction

  function automatic logic [3:0] tab4k(input logic [2:0] y);
    logic [3:0] r;
    case (y)
      3'd0: r = 4'b1011;  3'd1: r = 4'b0110;  3'd2: r = 4'b1010;  3'd3: r = 4'b1100;
      3'd4: r = 4'b1101;  3'd5: r = 4'b0101;  3'd6: r = 4'b1001;  default: r = 4'b0111;
    endcase
    return r;
  endfunction

  // a K code exists for K28.0-7 and K23.7, K27.7, K29.7, K30.7
  function automatic logic k_legal(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           ((b[7:5] == 3'd7) && (b[4:0] == 5'd23 || b[4:0] == 5'd27 ||
                                 b[4:0] == 5'd29 || b[4:0] == 5'd30));
  endfunction

  // encode byte b (K flag k) at running disparity rd (0 = negative);
  // returns {rd_out, code[9:0]} with code = {a,b,c,d,e,i,f,g,h,j}
  function automatic logic [10:0] enc8b10b_f(input logic [7:0] b, input logic k,
                                             input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd6, rdo;
    logic       alt7;
    x  = b[4:0];
    y  = b[7:5];
    c6 = (k && x == 5'd28) ? 6'b001111 : tab6(x);
    if (rd && (($countones(c6) != 3) || (c6 == 6'b111000))) c6 = ~c6;
    rd6 = rd ^ ($countones(c6) != 3);
    if (k) begin
      c4 = tab4k(y);
      if (rd6) c4 = ~c4;
    end else begin
      alt7 = (y == 3'd7) &&
             ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
      c4 = alt7 ? 4'b0111 : tab4d(y);
      if (rd6 && (($countones(c4) != 2) || (c4 == 4'b1100))) c4 = ~c4;
    end
    rdo = rd6 ^ ($countones(c4) != 2);
    return {rdo, c6, c4};
  endfunction

  // comma pattern, given the first seven bits (a..f) of a 10-bit code
  function automatic logic has_comma(input logic [6:0] c);
    return (c == 7'b0011111) || (c == 7'b1100000);
  endfunction

endpackage
