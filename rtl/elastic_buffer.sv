// elastic_buffer: receive elastic buffer between the receive clock and the
// local clock.
//
// Words are written in the receive (recovered) clock domain and read in the
// local clock domain, one per read slot. The two clocks run at nearly the
// same rate, so the buffer is kept near half full by treating SKIP ordered
// sets specially when they reach the read side:
//   * less than half full (local clock faster): the SKIP is read but the read
//     pointer is not advanced, once only, so a SKIP is added;
//   * more than half full (local clock slower): the read pointer moves past
//     the SKIP and the next word is read instead, so a SKIP is removed.
// This follows the document. Reading starts once the buffer is half full; an
// empty buffer (underflow) stops reading until it is half full again, and a
// write into a full buffer is dropped (overflow). Pointers cross the clock
// domains in Gray code through two-flop synchronisers; these start-up and
// error rules, and the depth, are this design's choices.
//
// Interface: write side wr_clk/wr_rst_n/wr_en/wr_data; read side rd_clk,
// rd_rst_n, rd_slot (one word wanted), rd_data/rd_valid registered on the
// slot, plus one-cycle event pulses in the read domain.
module elastic_buffer
  import sf_pkg::*;
#(
  parameter int unsigned DEPTH = 16    // power of two
) (
  input  logic     wr_clk,
  input  logic     wr_rst_n,
  input  logic     wr_en,
  input  rx_word_t wr_data,
  output logic     overflow,           // wr_clk domain pulse

  input  logic     rd_clk,
  input  logic     rd_rst_n,
  input  logic     rd_slot,
  output rx_word_t rd_data,
  output logic     rd_valid,
  output logic     skip_added,
  output logic     skip_removed,
  output logic     underflow
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam logic [AW:0] HALF = (AW+1)'(DEPTH / 2);

  rx_word_t mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin, wgray, rgray_w1, rgray_w2;
  logic [AW:0] rbin, rgray, wgray_r1, wgray_r2, fill;
  logic        full;
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      overflow <= wr_en && full;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side ----------------
  logic        started, repeated;
  rx_word_t    head, next;
  logic        head_skip;
  logic [AW:0] step;           // read pointer advance this slot

  assign fill      = gray2bin(wgray_r2) - rbin;
  assign head      = mem[rbin[AW-1:0]];
  assign next      = mem[rbin[AW-1:0] + 1'b1];
  assign head_skip = !head.invalid && is_os_type(head.w, OS_SKIP);

  // what this read slot does
  typedef enum logic [2:0] {A_NONE, A_START, A_UNDER, A_ADD, A_REMOVE, A_READ} act_e;
  act_e act;
  always_comb begin
    act  = A_NONE;
    step = '0;
    if (rd_slot) begin
      if (!started) begin
        if (fill >= HALF) act = A_START;
      end else if (fill == '0) begin
        act = A_UNDER;
      end else if (head_skip && fill < HALF && !repeated) begin
        act = A_ADD;                   // read the SKIP, keep the pointer
      end else if (head_skip && fill > HALF) begin
        act  = A_REMOVE;               // move past the SKIP
        step = 2;
      end else begin
        act  = A_READ;
        step = 1;
      end
    end
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin         <= '0;
      rgray        <= '0;
      wgray_r1     <= '0;
      wgray_r2     <= '0;
      started      <= 1'b0;
      repeated     <= 1'b0;
      rd_data      <= '0;
      rd_valid     <= 1'b0;
      skip_added   <= 1'b0;
      skip_removed <= 1'b0;
      underflow    <= 1'b0;
    end else begin
      wgray_r1     <= wgray;
      wgray_r2     <= wgray_r1;
      rd_valid     <= (act == A_ADD || act == A_REMOVE || act == A_READ);
      skip_added   <= (act == A_ADD);
      skip_removed <= (act == A_REMOVE);
      underflow    <= (act == A_UNDER);
      unique case (act)
        A_START:  started <= 1'b1;
        A_UNDER:  started <= 1'b0;
        A_ADD:    begin rd_data <= head; repeated <= 1'b1; end
        A_REMOVE: begin rd_data <= next; repeated <= 1'b0; end
        A_READ:   begin rd_data <= head; repeated <= 1'b0; end
        default:  ;
      endcase
      rbin  <= rbin + step;
      rgray <= bin2gray(rbin + step);
    end
  end
endmodule
