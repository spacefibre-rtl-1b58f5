// deserialiser: collects the serial bit stream into 10-bit groups.
//
// Bits are shifted in on every cycle of the (recovered) bit clock, the
// first-received bit ending up in bit 9. A free-running counter cuts the
// stream into groups of ten without regard to character boundaries;
// character alignment is done afterwards on the parallel data (alignment
// after de-serialisation). sym_valid pulses for one cycle with each group.
//
// Interface: clk = recovered bit clock, sin in; sym, sym_valid out.
module deserialiser (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sin,
  output logic [9:0] sym,
  output logic       sym_valid
);
  logic [8:0] sh;
  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh        <= '0;
      cnt       <= '0;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sh        <= {sh[7:0], sin};
      sym_valid <= 1'b0;
      if (cnt == 4'd9) begin
        cnt       <= '0;
        sym       <= {sh, sin};
        sym_valid <= 1'b1;
      end else begin
        cnt <= cnt + 4'd1;
      end
    end
  end
endmodule
