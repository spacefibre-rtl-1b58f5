// tb_tx_link_mux: transmit word selection.
//
// With a short SKIP interval (20 slots) and a word slot every third clock, it
// checks that a SKIP with an incrementing count is sent in exactly every
// 20th slot whatever is selected, that INIT_1, INIT_2 and IDLE carry the
// right bytes, and that in data mode the framing words are taken (up_take)
// and sent in order, with IDLE filling slots when none is offered.
module tb_tx_link_mux;
  import sf_pkg::*;
  localparam int unsigned SI = 20;
  logic clk = 0, rst_n = 0, ce = 0;
  tx_sel_e tx_sel = TXSEL_INIT1;
  sf_word_t up_word;
  logic up_valid = 0, up_take, skip_sent;
  sf_word_t word_out;
  int checks = 0, failures = 0;

  tx_link_mux #(.SKIP_INTERVAL(SI), .SPEED(8'h5A)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int slot = 0, n_skip = 0, n_up = 0, n_idle_fill = 0;
  logic [31:0] next_up = 32'h1000_0000;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL slot %0d: %s (word %h/%h)", slot, msg, word_out.k, word_out.d); end
  endtask

  // sample each slot just before the clock edge that consumes it
  always @(negedge clk) if (rst_n && ce) begin
    if ((slot % SI) == SI - 1) begin
      chk(word_out.k == K_OS && word_out.d == {K28_5, OS_SKIP, 16'(n_skip)}, "SKIP expected");
      chk(skip_sent && !up_take, "skip_sent");
      n_skip++;
    end else begin
      chk(!skip_sent, "no skip_sent");
      unique case (tx_sel)
        TXSEL_INIT1: chk(word_out == make_os(OS_INIT, D0_1, 8'h5A), "INIT_1");
        TXSEL_INIT2: chk(word_out == make_os(OS_INIT, D0_2, 8'h5A), "INIT_2");
        TXSEL_IDLE:  chk(word_out == make_os(OS_IDLE, D0_0, D0_0), "IDLE");
        default:
          if (up_valid) begin
            chk(up_take && word_out.k == K_DATA && word_out.d == next_up, "data word");
            n_up++;
          end else begin
            chk(!up_take && word_out == make_os(OS_IDLE, D0_0, D0_0), "IDLE fill");
            n_idle_fill++;
          end
      endcase
    end
    slot++;
  end

  // producer: a new word after each take
  always @(posedge clk) if (rst_n && up_take) next_up <= next_up + 1;
  assign up_word = '{k: K_DATA, d: next_up};

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    fork
      forever begin
        @(posedge clk); #1 ce = 0;
        @(posedge clk); #1 ce = 0;
        @(posedge clk); #1 ce = 1;
      end
    join_none
    repeat (150) @(posedge clk); #2 tx_sel = TXSEL_INIT2;
    repeat (150) @(posedge clk); #2 tx_sel = TXSEL_IDLE;
    repeat (150) @(posedge clk); #2 tx_sel = TXSEL_DATA;
    repeat (600) begin @(posedge clk); #2 up_valid = ($urandom_range(0, 3) != 0); end
    repeat (3) @(posedge clk);
    chk(n_skip == slot / SI && n_up > 100 && n_idle_fill > 10, "all cases seen");
    $display("slots %0d skips %0d data %0d idle fill %0d", slot, n_skip, n_up, n_idle_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
