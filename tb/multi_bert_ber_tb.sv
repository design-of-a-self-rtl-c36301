// multi_bert_ber_tb: a long BER measurement on the whole tester.
//
// Two measurement set-ups of the tester, shortened to 2,000,000 frames per
// channel: channel 1 runs inverted PRBS23 over a clean loopback (an
// intrinsic-BER run: it must end with zero error frames and zero bit errors),
// channel 3 runs inverted PRBS31 in serial loopback over a noisy line model
// that flips 1 to 20 random bits in about 0.2 % of the frames, never in three
// frames in a row. The testbench keeps its own tally of the corrupted frames,
// the corrupted bits and the gap between the last two corrupted frames, and at the
// end reads every status word of both channels through the GPIO port, as the
// processor software does, and compares. The BER the software would print,
// bit errors / (20 x total frames), is also checked against the tally. Only
// INIT_WORDS is reduced (to 300) to save time; the rest is at its defaults.
module multi_bert_ber_tb;
  import bert_pkg::*;

  localparam int unsigned FRAMES = 2_000_000;

  logic txc = 0, txc_top = 0, rst = 1, rst_top = 1;
  logic [0:31] gin = '0, gout;
  logic [7:0]  leds;
  logic [19:0] txd [3], rxd [3], ckd [2];
  logic        rxc [3], cd [3], eca [3], inh [3], pd [3], mrst [3];
  logic [1:0]  lb [3];
  logic        ck_rst;
  logic [19:0] flip = '0;
  int checks = 0, failures = 0;

  // line-error tally for channel 3
  bit          inject = 0;
  int unsigned since_flip = 100;
  longint unsigned rx_words = 0, last_flip_word = 0, prev_flip_word = 0;
  int unsigned n_err_frames = 0, n_err_bits = 0;

  always #5 txc = ~txc;
  always #2.5 txc_top = ~txc_top;
  initial begin rxc[0] = 0; #2; forever #5 rxc[0] = ~rxc[0]; end
  initial begin rxc[1] = 0; #4; forever #5 rxc[1] = ~rxc[1]; end
  initial begin rxc[2] = 0; #3; forever #5 rxc[2] = ~rxc[2]; end

  multi_bert #(.INIT_WORDS(300)) u_dut (
    .tx_clock(txc), .reset(rst), .tx_clock_top(txc_top), .reset_top(rst_top),
    .gpio_in(gin), .gpio_out(gout), .leds(leds),
    .mgt_tx_data(txd), .mgt_rx_data(rxd), .mgt_rx_clock(rxc), .mgt_comma_detect(cd),
    .mgt_enable_comma_align(eca), .mgt_loopback(lb), .mgt_tx_inhibit(inh),
    .mgt_powerdown(pd), .mgt_reset(mrst), .clk_chan_tx_data(ckd), .clk_chan_reset(ck_rst));

  mgt_model #(.SLIP(9))  u_mgt0 (.tx_clk(txc), .tx_data(txd[0]), .tx_inhibit(inh[0]), .rx_clk(rxc[0]),
    .enable_comma_align(eca[0]), .flip_mask(20'h0), .rx_data(rxd[0]), .comma_detect(cd[0]));
  mgt_model #(.SLIP(2))  u_mgt1 (.tx_clk(txc), .tx_data(txd[1]), .tx_inhibit(inh[1]), .rx_clk(rxc[1]),
    .enable_comma_align(eca[1]), .flip_mask(20'h0), .rx_data(rxd[1]), .comma_detect(cd[1]));
  mgt_model #(.SLIP(17)) u_mgt2 (.tx_clk(txc), .tx_data(txd[2]), .tx_inhibit(inh[2]), .rx_clk(rxc[2]),
    .enable_comma_align(eca[2]), .flip_mask(flip), .rx_data(rxd[2]), .comma_detect(cd[2]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (FRAMES + 20000) @(posedge txc);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Noisy line: the mask set here is applied to the word the model takes off
  // the line at the next rising edge, i.e. to exactly one frame.
  always @(negedge rxc[2]) begin
    logic [19:0] m;
    rx_words++;
    flip <= '0;
    since_flip++;
    if (inject && since_flip >= 3 && $urandom_range(999) < 2) begin
      m = 20'($urandom);
      if (m == '0) m = 20'h00001;
      flip <= m;
      since_flip = 0;
      n_err_frames++;
      n_err_bits += $countones(m);
      prev_flip_word = last_flip_word;
      last_flip_word = rx_words;
    end
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

  task automatic read_status(int chan, output ber_status_t s);
    logic [31:0] w0, w1, w2, w3, w4;
    xbert_write(3, 24'(chan - 1));
    xbert_read(0, w0); xbert_read(1, w1); xbert_read(2, w2); xbert_read(3, w3); xbert_read(4, w4);
    s.wait_s = w0[0]; s.lock = w0[1]; s.abort_s = w0[2]; s.overflow = w0[3];
    s.error_frames = w0[28:4]; s.bit_errors = w1;
    s.total_frames = {w2[17:9], w3}; s.error_interval = {w2[8:0], w4};
  endtask

  initial begin
    ber_status_t s1, s3;
    longint unsigned t_lock1, t_lock3, t_end;
    real ber_hw, ber_tally;
    repeat (5) @(negedge txc);
    rst = 0; rst_top = 0;
    repeat (20) @(negedge txc);
    // channel 1: PRBS23 inverted (id 9); channel 3: PRBS31 inverted (id 11),
    // serial loopback (bits [5:4] = 2'b10)
    xbert_write(0, 24'h000009);
    xbert_write(2, 24'h00002b);
    @(negedge txc); gin[5] = 1'b1; gin[7] = 1'b1; repeat (2) @(negedge txc); gin[5] = 1'b0; gin[7] = 1'b0;
    t_lock1 = 0;
    while (!(leds[1] && leds[5]) && t_lock1 < 5000) begin @(negedge txc); t_lock1++; end
    check(leds[1] && leds[5], "channels 1 and 3 locked");
    check(lb[2] == 2'b10 && lb[0] == 2'b00, "loopback modes set");
    t_lock1 = longint'($time / 10);
    t_lock3 = t_lock1;
    inject = 1;
    repeat (FRAMES) @(negedge txc);
    inject = 0;
    repeat (20) @(negedge txc);
    t_end = longint'($time / 10);
    read_status(1, s1);
    read_status(3, s3);
    $display("ch1: frames %0d errors %0d bits %0d", s1.total_frames, s1.error_frames, s1.bit_errors);
    $display("ch3: frames %0d errors %0d bits %0d interval %0d (tally %0d / %0d / gap %0d)",
             s3.total_frames, s3.error_frames, s3.bit_errors, s3.error_interval,
             n_err_frames, n_err_bits, last_flip_word - prev_flip_word);
    // intrinsic run: clean link
    check(s1.lock && !s1.abort_s && !s1.overflow, "channel 1 still locked");
    check(s1.error_frames == 0 && s1.bit_errors == 0, "channel 1 error free");
    check(64'(s1.total_frames) + 40 >= t_end - t_lock1 && 64'(s1.total_frames) <= t_end - t_lock1 + 40,
          $sformatf("channel 1 frames %0d for %0d clocks", s1.total_frames, t_end - t_lock1));
    // noisy run
    check(n_err_frames > 100, "line model produced errors");
    check(s3.lock && !s3.abort_s && !s3.overflow, "channel 3 still locked");
    check(32'(s3.error_frames) == n_err_frames, "channel 3 error frames equal the tally");
    check(s3.bit_errors == n_err_bits, "channel 3 bit errors equal the tally");
    check(64'(s3.error_interval) == last_flip_word - prev_flip_word - 1, "channel 3 error interval");
    check(64'(s3.total_frames) + 40 >= t_end - t_lock3 && 64'(s3.total_frames) <= t_end - t_lock3 + 40,
          $sformatf("channel 3 frames %0d for %0d clocks", s3.total_frames, t_end - t_lock3));
    ber_hw    = real'(s3.bit_errors) / (20.0 * real'(s3.total_frames));
    ber_tally = real'(n_err_bits) / (20.0 * real'(FRAMES));
    $display("BER read %e, injected %e", ber_hw, ber_tally);
    check(ber_hw > 0.99 * ber_tally && ber_hw < 1.01 * ber_tally, "BER as software computes it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
