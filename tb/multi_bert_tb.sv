// multi_bert_tb: the whole tester, three channels looped back, driven
// through the GPIO register interface the way the processor software does.
//
// Each channel's transceiver is a mgt_model with its own word misalignment
// and its own recovered-clock phase. INIT_WORDS is reduced to 300 (the
// full-length run is multi_bert_full_tb). The test: configure the three
// channels (PRBS32, PRBS31, PRBS7), reset them, wait for lock on the LEDs,
// then replay the register sequence of the reference simulation: select
// channel 1, read its frame count, toggle its error-insert bit, read 20 bit
// errors, select channel 2, reset it, read its frame count as 0 while it
// waits. Further: channel 3 gets TX inhibit (burst -> abort), then a pattern
// change and reset (re-lock), every status word is read and cross-checked,
// and the transceiver control bits and clock-channel words are checked.
// Each mechanism is counted; one that never happened is a failure. The
// bit-error overflow flag cannot be reached with a 32-bit counter in a
// simulation; bert_receiver_tb covers it with a narrow counter.
module multi_bert_tb;
  import bert_pkg::*;

  logic txc = 0, txc_top = 0, rst = 1, rst_top = 1;
  logic [0:31] gin = '0, gout;
  logic [7:0]  leds;
  logic [19:0] txd [3], rxd [3], ckd [2];
  logic        rxc [3], cd [3], eca [3], inh [3], pd [3], mrst [3];
  logic [1:0]  lb [3];
  logic        ck_rst;
  logic [19:0] flip = '0;
  int checks = 0, failures = 0;
  int n_align = 0, n_lock = 0, n_err_insert = 0, n_abort = 0, n_chan_reset = 0,
      n_select = 0, n_pattern_change = 0, n_wait = 0, n_clock_chan = 0, n_controls = 0;

  always #5 txc = ~txc;
  always #2.5 txc_top = ~txc_top;
  initial begin rxc[0] = 0; #1; forever #5 rxc[0] = ~rxc[0]; end
  initial begin rxc[1] = 0; #3; forever #5 rxc[1] = ~rxc[1]; end
  initial begin rxc[2] = 0; #4; forever #5 rxc[2] = ~rxc[2]; end

  multi_bert #(.INIT_WORDS(300)) u_dut (
    .tx_clock(txc), .reset(rst), .tx_clock_top(txc_top), .reset_top(rst_top),
    .gpio_in(gin), .gpio_out(gout), .leds(leds),
    .mgt_tx_data(txd), .mgt_rx_data(rxd), .mgt_rx_clock(rxc), .mgt_comma_detect(cd),
    .mgt_enable_comma_align(eca), .mgt_loopback(lb), .mgt_tx_inhibit(inh),
    .mgt_powerdown(pd), .mgt_reset(mrst), .clk_chan_tx_data(ckd), .clk_chan_reset(ck_rst));

  mgt_model #(.SLIP(3))  u_mgt0 (.tx_clk(txc), .tx_data(txd[0]), .tx_inhibit(inh[0]), .rx_clk(rxc[0]),
    .enable_comma_align(eca[0]), .flip_mask(flip), .rx_data(rxd[0]), .comma_detect(cd[0]));
  mgt_model #(.SLIP(11)) u_mgt1 (.tx_clk(txc), .tx_data(txd[1]), .tx_inhibit(inh[1]), .rx_clk(rxc[1]),
    .enable_comma_align(eca[1]), .flip_mask(20'h0), .rx_data(rxd[1]), .comma_detect(cd[1]));
  mgt_model #(.SLIP(0))  u_mgt2 (.tx_clk(txc), .tx_data(txd[2]), .tx_inhibit(inh[2]), .rx_clk(rxc[2]),
    .enable_comma_align(eca[2]), .flip_mask(20'h0), .rx_data(rxd[2]), .comma_detect(cd[2]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge txc);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < 3; c++) begin : g_mon
    always @(posedge rxc[c]) if (eca[c]) n_align++;
  end

  // GPIO driver, as the processor's XBERT_write / XBERT_read / XBERT_reset
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

  task automatic xbert_reset(int chan);   // chan 1..3
    @(negedge txc);
    gin[5+chan-1] = 1'b1;
    repeat (2) @(negedge txc);
    gin[5+chan-1] = 1'b0;
    n_chan_reset++;
  endtask

  task automatic select(int chan);
    xbert_write(3, 24'(chan - 1));
    n_select++;
  endtask

  task automatic wait_leds(int chan, bit lock, output int cycles);
    cycles = 0;
    while (leds[2*(chan-1)+1] != lock && cycles < 5000) begin @(negedge txc); cycles++; end
    check(leds[2*(chan-1)+1] == lock, $sformatf("channel %0d lock LED = %0d", chan, lock));
  endtask

  task automatic read_status(int chan, output ber_status_t s);
    logic [31:0] w0, w1, w2, w3, w4;
    select(chan);
    xbert_read(0, w0); xbert_read(1, w1); xbert_read(2, w2); xbert_read(3, w3); xbert_read(4, w4);
    s.wait_s = w0[0]; s.lock = w0[1]; s.abort_s = w0[2]; s.overflow = w0[3];
    s.error_frames = w0[28:4]; s.bit_errors = w1;
    s.total_frames = {w2[17:9], w3}; s.error_interval = {w2[8:0], w4};
    check(w0[31:29] == 0 && w2[31:18] == 0, "unused status bits are zero");
  endtask

  initial begin
    logic [31:0] v;
    ber_status_t s;
    int n;
    repeat (5) @(negedge txc);
    rst = 0; rst_top = 0;
    repeat (20) @(negedge txc);
    // configure: ch1 PRBS32 serial loopback, ch2 PRBS31, ch3 PRBS7
    xbert_write(0, 24'h00002c);
    xbert_write(1, 24'h00000b);
    xbert_write(2, 24'h000003);
    check(lb[0] == 2'b10 && lb[1] == 2'b00 && !pd[0] && !inh[0], "control bits reach the transceivers");
    n_controls++;
    for (int c = 1; c <= 3; c++) xbert_reset(c);
    @(negedge txc);
    check(mrst[0] && mrst[1] && mrst[2], "transceiver resets during channel reset");
    repeat (40) @(negedge txc);
    check(leds[0] && leds[2] && leds[4], "all channels waiting (wait LEDs)");
    if (leds[0]) n_wait++;
    for (int c = 1; c <= 3; c++) begin wait_leds(c, 1, n); if (leds[2*(c-1)+1]) n_lock++; end
    check(ckd[0] == 20'hAAAAA && ckd[1] == 20'hAAAAA && !ck_rst, "clock channels send 1010...");
    n_clock_chan++;
    repeat (100) @(negedge txc);
    // 1. select channel 1   2. read its total frames
    select(1);
    xbert_read(3, v);
    check(v > 90 && v < 400, $sformatf("channel 1 frames %0d", v));
    // 3. write 0x00012c to address 0: toggles error insert
    xbert_write(0, 24'h00012c);
    n_err_insert++;
    repeat (30) @(negedge txc);
    // 4. read bit errors of channel 1
    xbert_read(1, v);
    check(v == 20, $sformatf("channel 1 bit errors %0d, expected 20", v));
    read_status(1, s);
    check(s.lock && s.error_frames == 1 && s.bit_errors == 20 && !s.abort_s && !s.overflow,
          "channel 1 status after one inserted error");
    // 5. select channel 2   6. reset channel 2 (0x02000000)   7. read its frames
    select(2);
    @(negedge txc); gin = 32'h0200_0000; repeat (2) @(negedge txc); gin = '0;
    n_chan_reset++;
    repeat (20) @(negedge txc);
    xbert_read(3, v);
    check(v == 0, "channel 2 frames read 0 while waiting after reset");
    check(leds[2] && !leds[3], "channel 2 waiting after reset");
    wait_leds(2, 1, n);
    // channels 1 and 3 unaffected by channel 2's reset
    read_status(3, s);
    check(s.lock && s.error_frames == 0 && s.total_frames > 300, "channel 3 undisturbed");
    // channel 3: TX inhibit -> burst of errors -> abort
    xbert_write(2, 24'h000043);
    repeat (40) @(negedge txc);
    read_status(3, s);
    check(s.abort_s && !s.lock, "channel 3 aborted on TX inhibit");
    if (s.abort_s) n_abort++;
    check(!leds[4] && !leds[5], "channel 3 LEDs dark in abort");
    // channel 3: new pattern (counter), inhibit off, reset -> re-lock
    xbert_write(2, 24'h00000f);
    xbert_reset(3);
    wait_leds(3, 1, n);
    read_status(3, s);
    check(s.lock && s.error_frames == 0 && !s.abort_s, "channel 3 re-locked on the counter pattern");
    if (s.lock) n_pattern_change++;
    // channel 1: a 2-bit line error, then the error interval
    repeat (50) @(negedge rxc[0]);
    flip = 20'h00300; @(negedge rxc[0]); flip = '0;
    repeat (30) @(negedge txc);
    read_status(1, s);
    check(s.error_frames == 2 && s.bit_errors == 22, "channel 1 line error of 2 bits");
    check(s.error_interval > 50, $sformatf("channel 1 error interval %0d", s.error_interval));
    // mechanisms
    check(n_align >= 5, $sformatf("comma alignments: %0d", n_align));
    check(n_lock == 3 && n_wait > 0 && n_err_insert > 0 && n_abort > 0 && n_chan_reset > 0 &&
          n_select > 0 && n_pattern_change > 0 && n_clock_chan > 0 && n_controls > 0,
          "every mechanism exercised");
    $display("align=%0d lock=%0d wait=%0d err_insert=%0d abort=%0d chan_reset=%0d select=%0d pattern_change=%0d",
             n_align, n_lock, n_wait, n_err_insert, n_abort, n_chan_reset, n_select, n_pattern_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
