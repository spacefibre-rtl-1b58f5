// rx_polarity: receive polarity inversion stage.
//
// Each 10-bit group from the de-serialiser is registered, inverted when
// invert is high. Swapping the polarity of the received pair turns every bit
// over, so this lets the two wires of a differential pair be crossed on the
// board. The invert decision comes from the receive synchronisation state
// machine, which flips it when correctly aligned characters still fail to
// decode. One cycle of latency.
//
// Interface: sym_in/sym_in_valid/invert in; sym_out/sym_out_valid out.
module rx_polarity (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] sym_in,
  input  logic       sym_in_valid,
  input  logic       invert,
  output logic [9:0] sym_out,
  output logic       sym_out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_out       <= '0;
      sym_out_valid <= 1'b0;
    end else begin
      sym_out_valid <= sym_in_valid;
      if (sym_in_valid) sym_out <= invert ? ~sym_in : sym_in;
    end
  end
endmodule
