// multi_bert_full_tb: one complete test at the tester's real sizes.
//
// multi_bert with every parameter at its default: 2^18 comma words per
// initialization sequence, 64-comma remote-reset detection, three channels.
// After power-up reset the channels are set to PRBS23 (inverted), PRBS20 and
// the 1/10 clock pattern through the GPIO interface; all three must lock only
// after the full comma sequence (2^18 words) has gone by. Then one error is
// inserted on each channel and each must report exactly 1 error frame and 20
// bit errors, and total frames consistent with the time since lock.
module multi_bert_full_tb;
  import bert_pkg::*;

  logic txc = 0, txc_top = 0, rst = 1, rst_top = 1;
  logic [0:31] gin = '0, gout;
  logic [7:0]  leds;
  logic [19:0] txd [3], rxd [3], ckd [2];
  logic        rxc [3], cd [3], eca [3], inh [3], pd [3], mrst [3];
  logic [1:0]  lb [3];
  logic        ck_rst;
  int checks = 0, failures = 0;

  always #5 txc = ~txc;
  always #2.5 txc_top = ~txc_top;
  initial begin rxc[0] = 0; #2; forever #5 rxc[0] = ~rxc[0]; end
  initial begin rxc[1] = 0; #3; forever #5 rxc[1] = ~rxc[1]; end
  initial begin rxc[2] = 0; #1; forever #5 rxc[2] = ~rxc[2]; end

  multi_bert u_dut (
    .tx_clock(txc), .reset(rst), .tx_clock_top(txc_top), .reset_top(rst_top),
    .gpio_in(gin), .gpio_out(gout), .leds(leds),
    .mgt_tx_data(txd), .mgt_rx_data(rxd), .mgt_rx_clock(rxc), .mgt_comma_detect(cd),
    .mgt_enable_comma_align(eca), .mgt_loopback(lb), .mgt_tx_inhibit(inh),
    .mgt_powerdown(pd), .mgt_reset(mrst), .clk_chan_tx_data(ckd), .clk_chan_reset(ck_rst));

  mgt_model #(.SLIP(5))  u_mgt0 (.tx_clk(txc), .tx_data(txd[0]), .tx_inhibit(inh[0]), .rx_clk(rxc[0]),
    .enable_comma_align(eca[0]), .flip_mask(20'h0), .rx_data(rxd[0]), .comma_detect(cd[0]));
  mgt_model #(.SLIP(13)) u_mgt1 (.tx_clk(txc), .tx_data(txd[1]), .tx_inhibit(inh[1]), .rx_clk(rxc[1]),
    .enable_comma_align(eca[1]), .flip_mask(20'h0), .rx_data(rxd[1]), .comma_detect(cd[1]));
  mgt_model #(.SLIP(19)) u_mgt2 (.tx_clk(txc), .tx_data(txd[2]), .tx_inhibit(inh[2]), .rx_clk(rxc[2]),
    .enable_comma_align(eca[2]), .flip_mask(20'h0), .rx_data(rxd[2]), .comma_detect(cd[2]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge txc);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xbert_write(int addr, logic [23:0] data);
    @(negedge txc);
    gin[2:4] = 3'(addr); gin[8:31] = data; gin[0:1] = 2'b11;
    @(negedge txc);
    gin[0:1] = 2'b00;
    repeat (2) @(negedge txc);
  endtask

  task automatic xbert_read(int addr, output logic [31:0] v);
    @(negedge txc);
    gin[2:4] = 3'(addr); gin[0:1] = 2'b01;
    @(negedge txc);
    gin[0:1] = 2'b00;
    @(negedge txc);
    v = gout;
  endtask

  initial begin
    logic [31:0] v, f;
    int t0, t_lock;
    repeat (5) @(negedge txc);
    rst = 0; rst_top = 0;
    repeat (20) @(negedge txc);
    xbert_write(0, 24'h000009);
    xbert_write(1, 24'h000007);
    xbert_write(2, 24'h000001);
    // restart all three channels with the new patterns
    @(negedge txc); gin[5:7] = 3'b111; repeat (2) @(negedge txc); gin[5:7] = 3'b000;
    t0 = 0;
    while (leds[5:0] != 6'b101010 && t0 < 300000) begin @(negedge txc); t0++; end
    check(leds[5:0] == 6'b101010, "all three channels locked");
    check(t0 >= 262144 && t0 < 262144 + 200, $sformatf("lock %0d clocks after reset, 2^18 commas first", t0));
    repeat (1000) @(negedge txc);
    for (int c = 0; c < 3; c++) xbert_write(c, 24'h000100 | (c == 0 ? 24'h9 : c == 1 ? 24'h7 : 24'h1));
    repeat (30) @(negedge txc);
    for (int c = 0; c < 3; c++) begin
      xbert_write(3, 24'(c));
      xbert_read(1, v);
      check(v == 20, $sformatf("channel %0d bit errors %0d", c + 1, v));
      xbert_read(0, v);
      check(v[28:4] == 1 && v[1] && !v[2] && !v[3], $sformatf("channel %0d status word %h", c + 1, v));
      xbert_read(3, f);
      check(f > 1000 && f < 1200, $sformatf("channel %0d total frames %0d", c + 1, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
