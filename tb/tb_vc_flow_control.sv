// tb_vc_flow_control: FCT credit flow control.
//
// With 4 channels and a 10-clock hold: a frame on a channel with no credit
// must be held back; one received FCT must let exactly one frame through;
// FCTs for two other channels must not help; buffer-room requests must come
// out as FCTs with per-channel sequence numbers, ahead of a waiting user
// ordered set, and only after the hold time; received FCTs must be consumed
// and other ordered sets passed on; leaving Active must clear the credits.
module tb_vc_flow_control;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0, active = 0;
  logic [31:0] user_txdata = '0, fc_txdata, user_tx_ord_set = '0, fc_tx_ord_set;
  logic [31:0] fc_rx_ord_set = '0, user_rx_ord_set;
  logic user_txdata_rdy = 0, user_txdata_read, fc_txdata_rdy, fc_txdata_read = 0;
  logic user_tx_ord_set_rdy = 0, user_tx_ord_set_read, fc_tx_ord_set_rdy, fc_tx_ord_set_read = 0;
  logic fc_rx_ord_set_valid = 0, user_rx_ord_set_valid;
  logic rx_buffer_free = 0, rx_buffer_free_ready, fct_sent, fct_received, frame_held;
  logic [7:0] rx_buffer_vc = '0;
  int checks = 0, failures = 0;

  vc_flow_control #(.NUM_VC(4), .HOLD(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic rx_os(input logic [31:0] os);
    @(negedge clk); fc_rx_ord_set = os; fc_rx_ord_set_valid = 1;
    @(negedge clk); fc_rx_ord_set_valid = 0;
  endtask

  // framer model: reads a whole frame (header + len words) when rdy
  task automatic frame_through(input int vc, input int len);
    @(negedge clk);
    user_txdata = {16'h0, 8'(vc), 8'(len)}; user_txdata_rdy = 1;
    #1 chk(fc_txdata_rdy, $sformatf("frame on vc %0d with credit offered", vc));
    for (int i = 0; i <= len; i++) begin
      fc_txdata_read = 1; @(negedge clk);
      if (i < len) begin
        user_txdata = 32'hD000_0000 + i;
        #1 chk(fc_txdata_rdy && user_txdata_read, "data words pass inside a frame");
      end
    end
    fc_txdata_read = 0; user_txdata_rdy = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; active = 1;
    // no credit: held
    @(negedge clk); user_txdata = {16'h0, 8'd1, 8'd3}; user_txdata_rdy = 1;
    #1 chk(!fc_txdata_rdy && frame_held, "frame held without credit");
    rx_os({K28_5, OS_FCT, 8'd0, 8'd2});
    rx_os({K28_5, OS_FCT, 8'd0, 8'd3});
    #1 chk(!fc_txdata_rdy, "credit on other channels does not help");
    rx_os({K28_5, OS_FCT, 8'd0, 8'd1});
    #1 chk(fc_txdata_rdy && !frame_held, "credit received");
    user_txdata_rdy = 0;
    frame_through(1, 3);
    @(negedge clk); user_txdata = {16'h0, 8'd1, 8'd2}; user_txdata_rdy = 1;
    #1 chk(!fc_txdata_rdy, "credit used up");
    user_txdata_rdy = 0;
    frame_through(2, 0);  // zero-length frame on channel 2
    // received ordered sets
    fork
      begin
        int n_user = 0, n_fct = 0;
        repeat (12) begin
          @(posedge clk);
          if (user_rx_ord_set_valid) n_user++;
          if (fct_received) n_fct++;
        end
        chk(n_user == 1 && n_fct == 1, "FCT consumed, other ordered set passed");
      end
      begin
        rx_os({K28_5, 8'hE0, 8'h12, 8'h34});
        rx_os({K28_5, OS_FCT, 8'd5, 8'd3});
      end
    join
    chk(user_rx_ord_set == {K28_5, 8'hE0, 8'h12, 8'h34}, "user ordered set value");
    // FCT generation, ahead of a user ordered set
    @(negedge clk); user_tx_ord_set = {K28_5, 8'hE0, 16'hBEEF}; user_tx_ord_set_rdy = 1;
    rx_buffer_vc = 8'd2; rx_buffer_free = 1; @(negedge clk);
    rx_buffer_vc = 8'd0; @(negedge clk);
    rx_buffer_vc = 8'd2; @(negedge clk); rx_buffer_free = 0;
    for (int i = 0; i < 3; i++) begin
      logic [31:0] exp;
      exp = {K28_5, OS_FCT, (i == 2) ? 8'd1 : 8'd0, (i == 1) ? 8'd0 : 8'd2};
      #1 chk(fc_tx_ord_set_rdy && fc_tx_ord_set == exp,
             $sformatf("FCT %0d: %h expected %h", i, fc_tx_ord_set, exp));
      fc_tx_ord_set_read = 1; #1 chk(fct_sent && !user_tx_ord_set_read, "FCT read, user OS waits");
      @(negedge clk); fc_tx_ord_set_read = 0; @(negedge clk);
    end
    #1 chk(fc_tx_ord_set == user_tx_ord_set, "user ordered set after the FCTs");
    fc_tx_ord_set_read = 1; #1 chk(user_tx_ord_set_read && !fct_sent, "user OS read");
    @(negedge clk); fc_tx_ord_set_read = 0; user_tx_ord_set_rdy = 0;
    // leaving Active clears credit (channel 3 has two)
    @(negedge clk); user_txdata = {16'h0, 8'd3, 8'd1}; user_txdata_rdy = 1;
    #1 chk(fc_txdata_rdy, "channel 3 has credit");
    active = 0; @(negedge clk); active = 1; @(negedge clk);
    #1 chk(!fc_txdata_rdy, "credit cleared by leaving Active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
