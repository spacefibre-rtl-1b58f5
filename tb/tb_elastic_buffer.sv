// tb_elastic_buffer: rate matching with SKIP insertion and deletion.
//
// Words numbered in sequence, with a SKIP every 16th word, are written on
// one clock and read on another, one read per read-clock cycle.
// Run 1: write clock 4% faster than read clock; SKIPs must be removed, the
// buffer must never overflow and every non-SKIP word must arrive, in order.
// Run 2: write clock 4% slower; SKIPs must be added (read twice), there must
// be no underflow once started, and again no data word lost or reordered.
module tb_elastic_buffer;
  timeunit 1ns;
  timeprecision 1ps;
  import sf_pkg::*;
  logic wr_clk = 0, rd_clk = 0, rst_n = 0, wr_en = 0, rd_slot = 1;
  rx_word_t wr_data, rd_data;
  logic overflow, rd_valid, skip_added, skip_removed, underflow;
  int checks = 0, failures = 0;
  realtime wr_half = 5.0, rd_half = 5.0;

  elastic_buffer dut (.wr_clk, .wr_rst_n(rst_n), .wr_en, .wr_data, .overflow,
                      .rd_clk, .rd_rst_n(rst_n), .rd_slot, .rd_data, .rd_valid,
                      .skip_added, .skip_removed, .underflow);

  always #(wr_half) wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_add = 0, n_rem = 0, n_ovf = 0, n_unf = 0, expect_seq = 0, n_skip_out = 0;
  always @(posedge rd_clk) if (rst_n) begin
    if (skip_added) n_add++;
    if (skip_removed) n_rem++;
    if (underflow && wr_en) n_unf++;  // the drain after the last write does not count
    if (rd_valid) begin
      if (is_os_type(rd_data.w, OS_SKIP)) n_skip_out++;
      else begin
        checks++;
        if (rd_data.w.d !== 32'(expect_seq)) begin
          failures++;
          if (failures < 5) $display("FAIL got %0d expected %0d", rd_data.w.d, expect_seq);
          expect_seq = int'(rd_data.w.d);
        end
        expect_seq++;
      end
    end
  end
  always @(posedge wr_clk) if (rst_n && overflow) n_ovf++;

  task automatic run(input int nwords);
    int seq = 0;
    rst_n = 0; expect_seq = 0; n_add = 0; n_rem = 0; n_ovf = 0; n_unf = 0; n_skip_out = 0;
    #50; rst_n = 1;
    for (int i = 0; i < nwords; i++) begin
      @(negedge wr_clk);
      wr_en = 1;
      wr_data.invalid = 0;
      if (i % 16 == 15) wr_data.w = make_os(OS_SKIP, 8'h00, 8'(i / 16));
      else begin wr_data.w.k = K_DATA; wr_data.w.d = 32'(seq); seq++; end
    end
    @(negedge wr_clk); wr_en = 0;
    #400;
  endtask

  initial begin
    wr_half = 5.0; rd_half = 5.2;
    run(2000);
    $display("faster writer: removed %0d added %0d overflow %0d", n_rem, n_add, n_ovf);
    checks++; if (n_rem == 0) begin failures++; $display("FAIL no SKIP removed"); end
    checks++; if (n_ovf != 0) begin failures++; $display("FAIL overflow"); end
    checks++; if (n_add > 2) failures++;  // at most a start-up addition
    wr_half = 5.2; rd_half = 5.0;
    run(2000);
    $display("slower writer: removed %0d added %0d underflow %0d", n_rem, n_add, n_unf);
    checks++; if (n_add == 0) begin failures++; $display("FAIL no SKIP added"); end
    checks++; if (n_unf != 0) begin failures++; $display("FAIL underflow"); end
    checks++; if (n_rem > 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
