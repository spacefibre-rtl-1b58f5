// tx_link_mux: transmit side of link initialisation and data rate
// adjustment.
//
// In every word slot (ce) it picks the word handed to the 8B/10B encoder:
//   1. a SKIP ordered set when the SKIP insertion counter has counted
//      SKIP_INTERVAL slots (SKIP = K28.5, D0.0, count MS, count LS);
//   2. otherwise what the link initialisation state machine asks for:
//      INIT_1 (K28.5, D10.2, D0.1, speed), INIT_2 (K28.5, D10.2, D0.2,
//      speed) or IDLE (K28.5, D0.1, D0.0, D0.0);
//   3. in the Active state the framing layer's word, taken with up_take.
// The ordered-set contents and the rule of one SKIP at most every 5000
// words follow the document; the SKIP count bytes carry a running count of
// SKIPs sent, and the speed byte is a parameter, both this design's choice.
// The output is combinational; the encoder registers it on the same ce.
//
// Interface: ce, tx_sel from the link state machine, up_word/up_valid from
// framing, up_take back; word_out to the encoder; skip_sent pulses.
module tx_link_mux
  import sf_pkg::*;
#(
  parameter int unsigned SKIP_INTERVAL = 5000,
  parameter logic [7:0]  SPEED         = 8'h00
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ce,
  input  tx_sel_e  tx_sel,
  input  sf_word_t up_word,
  input  logic     up_valid,
  output logic     up_take,
  output sf_word_t word_out,
  output logic     skip_sent
);
  logic [$clog2(SKIP_INTERVAL+1)-1:0] cnt;
  logic [15:0] skip_count;
  logic        skip_due;

  assign skip_due = (cnt == ($bits(cnt))'(SKIP_INTERVAL - 1));

  always_comb begin
    up_take   = 1'b0;
    skip_sent = 1'b0;
    if (skip_due) begin
      word_out  = make_os(OS_SKIP, skip_count[15:8], skip_count[7:0]);
      skip_sent = ce;
    end else begin
      unique case (tx_sel)
        TXSEL_INIT1: word_out = make_os(OS_INIT, D0_1, SPEED);
        TXSEL_INIT2: word_out = make_os(OS_INIT, D0_2, SPEED);
        TXSEL_IDLE:  word_out = make_os(OS_IDLE, D0_0, D0_0);
        default: begin
          if (up_valid) begin
            word_out = up_word;
            up_take  = ce;
          end else begin
            word_out = make_os(OS_IDLE, D0_0, D0_0);
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      skip_count <= '0;
    end else if (ce) begin
      if (skip_due) begin
        cnt        <= '0;
        skip_count <= skip_count + 16'd1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
