// serialiser: sends an encoded word as a serial bit stream.
//
// On load the WORD_BITS-bit word (four 10-bit codes, first code in the top
// bits) is taken into a shift register; each following bit-clock cycle the
// register shifts left, so sout carries bit WORD_BITS-1 in the cycle after the
// load and the last bit WORD_BITS cycles later. The caller loads every
// WORD_BITS cycles for a continuous stream. This combines the 40:10 word to
// symbol multiplexer and the 10-bit serialiser of the transmit path into one
// shift register, which is this design's choice; enable low forces the line
// to a constant 0 (transmitter quiet).
//
// Interface: clk is the bit clock; load, word, enable in; sout out.
module serialiser #(
  parameter int unsigned WORD_BITS = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [WORD_BITS-1:0] word,
  input  logic                 enable,
  output logic                 sout
);
  logic [WORD_BITS-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sh <= '0;
    else if (load) sh <= word;
    else           sh <= {sh[WORD_BITS-2:0], 1'b0};
  end

  assign sout = enable & sh[WORD_BITS-1];
endmodule
