// link_os_rx: link layer ordered set extraction on the receive side.
//
// Each word leaving the receive elastic buffer is classified. SKIPs are
// dropped (they exist only for rate matching); IDLE, INIT_1 and INIT_2 are
// reported to the link initialisation state machine as one-cycle pulses and
// dropped; the speed byte of the last INIT is kept. Words that failed to
// decode are dropped and reported. Everything else (data words, framing,
// flow control and user ordered sets) is passed up to framing when pass_en
// is high (link Active). One cycle of latency.
//
// Interface: in_word/in_valid in; got_* pulses, rx_speed, up_word/up_valid.
module link_os_rx
  import sf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rx_word_t   in_word,
  input  logic       in_valid,
  input  logic       pass_en,
  output logic       got_init1,
  output logic       got_init2,
  output logic       got_idle,
  output logic       got_skip,
  output logic       got_invalid,
  output logic [7:0] rx_speed,
  output sf_word_t   up_word,
  output logic       up_valid
);
  sf_word_t w;
  logic     init1, init2, idle, skip;
  logic     ok;
  assign w     = in_word.w;
  assign ok    = in_valid && !in_word.invalid;
  assign init1 = is_os_type(w, OS_INIT) && w.d[15:8] == D0_1;
  assign init2 = is_os_type(w, OS_INIT) && w.d[15:8] == D0_2;
  assign idle  = is_os_type(w, OS_IDLE);
  assign skip  = is_os_type(w, OS_SKIP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_init1   <= 1'b0;
      got_init2   <= 1'b0;
      got_idle    <= 1'b0;
      got_skip    <= 1'b0;
      got_invalid <= 1'b0;
      rx_speed    <= '0;
      up_word     <= '0;
      up_valid    <= 1'b0;
    end else begin
      got_init1   <= ok && init1;
      got_init2   <= ok && init2;
      got_idle    <= ok && idle;
      got_skip    <= ok && skip;
      got_invalid <= in_valid && in_word.invalid;
      if (ok && (init1 || init2)) rx_speed <= w.d[7:0];
      up_valid <= ok && pass_en && !(init1 || init2 || idle || skip);
      if (ok) up_word <= w;
    end
  end
endmodule
