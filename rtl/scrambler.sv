// scrambler: additive data scrambler / de-scrambler, 32 bits per word.
//
// A 16-bit Galois shift register (stages D0..D15, as drawn in the document)
// implements G(x) = x^16 + x^5 + x^4 + x^3 + 1: D15 feeds D0 and is XORed
// into the inputs of D3, D4 and D5. Each data bit is XORed with D15 and the
// register then steps once. Since the sequence does not depend on the data,
// the same block de-scrambles. The register is loaded with 0xFFFF by seed,
// which framing asserts at the start of every data or idle frame. The 32
// bits of a word are taken bit 31 first, the register stepping 32 times per
// word; this bit order is this design's choice.
//
// Interface: din in, dout = din XOR key stream (combinational); seed reloads,
// adv steps the register by one word (seed wins).
module scrambler #(
  parameter logic [15:0] SEED = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed,
  input  logic        adv,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [15:0] lfsr, lfsr_next;
  logic [31:0] key;

  always_comb begin
    logic [15:0] s;
    s = lfsr;
    for (int i = 31; i >= 0; i--) begin
      key[i] = s[15];
      s = {s[14:5], s[4] ^ s[15], s[3] ^ s[15], s[2] ^ s[15], s[1:0], s[15]};
    end
    lfsr_next = s;
  end

  assign dout = din ^ key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   lfsr <= SEED;
    else if (seed) lfsr <= SEED;
    else if (adv)  lfsr <= lfsr_next;
  end
endmodule
