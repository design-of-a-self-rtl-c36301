// bert_channel_tb: one channel looped back through a transceiver model.
//
// The transceiver model starts 7 bits off the word boundary, so the channel
// only locks if the comma sequence makes it re-align. INIT_WORDS is cut to
// 200 to keep the run short. Checked through status_out (i.e. after the
// clock-domain FIFO): wait then lock, frames counting up, one toggle of
// error_insert giving exactly one error frame of 20 bit errors, a TX
// inhibit giving ABORT, and a channel reset with a new pattern giving a fresh
// lock with cleared counters. The receive clock has the same period as the
// transmit clock but another phase.
module bert_channel_tb;
  import bert_pkg::*;

  logic txc = 0, rxc = 0, txr = 1, rxr = 1;
  chan_ctrl_t  ctrl = '0;
  ber_status_t st;
  logic [19:0] txd, rxd, flip = '0;
  logic cd, eca, inh, pd, mrst;
  logic [1:0] lb;
  int checks = 0, failures = 0;

  always #5 txc = ~txc;
  initial begin #3; forever #5 rxc = ~rxc; end

  bert_channel #(.INIT_WORDS(200)) u_dut (
    .tx_clock_in(txc), .tx_reset_in(txr), .rx_clock_in(rxc), .rx_reset_in(rxr),
    .ctrl_in(ctrl), .status_out(st), .tx_data(txd), .rx_data(rxd), .comma_detect(cd),
    .enable_comma_align(eca), .loopback(lb), .tx_inhibit(inh), .powerdown(pd), .mgt_reset(mrst));

  mgt_model #(.SLIP(7)) u_mgt (.tx_clk(txc), .tx_data(txd), .tx_inhibit(inh), .rx_clk(rxc),
    .enable_comma_align(eca), .flip_mask(flip), .rx_data(rxd), .comma_detect(cd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge txc);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reset_channel();
    @(negedge txc); txr = 1; rxr = 1;
    repeat (4) @(negedge txc);
    txr = 0; @(negedge rxc); rxr = 0;
  endtask

  task automatic wait_lock(output int cycles);
    cycles = 0;
    while (!st.lock && cycles < 2000) begin @(negedge txc); cycles++; end
  endtask

  initial begin
    int n;
    logic [40:0] f0;
    ctrl.pattern_select = PAT_PRBS15;
    reset_channel();
    repeat (50) @(negedge txc);
    check(st.wait_s && !st.lock, "waiting during the comma sequence");
    check(mrst == 0 && lb == 2'b00 && !pd, "transceiver controls");
    wait_lock(n);
    check(st.lock, "locked");
    // 200 commas, a few words of pipeline and FIFO
    check(n > 150 && n < 260, $sformatf("lock after %0d more clocks", n));
    check(u_mgt.aligns == 1, "transceiver re-aligned once");
    f0 = st.total_frames;
    repeat (100) @(negedge txc);
    check(st.total_frames - f0 >= 98 && st.total_frames - f0 <= 102, "one frame per clock");
    check(st.error_frames == 0 && st.bit_errors == 0, "no errors on a clean link");
    // error insert toggle -> exactly one error frame of 20 bits
    ctrl.error_insert = 1;
    repeat (30) @(negedge txc);
    check(st.error_frames == 1 && st.bit_errors == 20, $sformatf("one inserted error: %0d frames %0d bits",
          st.error_frames, st.bit_errors));
    ctrl.error_insert = 0;
    repeat (30) @(negedge txc);
    check(st.error_frames == 2 && st.bit_errors == 40, "toggle back inserts one more");
    check(st.error_interval >= 25 && st.error_interval <= 35, $sformatf("error interval %0d", st.error_interval));
    check(st.lock, "still locked");
    // a single line error of 3 bits
    @(negedge rxc); flip = 20'h00070; @(negedge rxc); flip = '0;
    repeat (20) @(negedge txc);
    check(st.error_frames == 3 && st.bit_errors == 43, "3-bit line error counted");
    // tx inhibit -> burst -> abort
    ctrl.tx_inhibit = 1;
    repeat (30) @(negedge txc);
    check(st.abort_s && !st.lock && !st.wait_s, "abort on burst errors");
    ctrl.tx_inhibit = 0;
    // reset with a new pattern
    ctrl.pattern_select = PAT_COUNTER;
    reset_channel();
    repeat (20) @(negedge txc);
    check(!st.abort_s && st.total_frames == 0 && st.error_frames == 0, "counters and abort cleared");
    wait_lock(n);
    check(st.lock, "re-locked on the counter pattern");
    repeat (50) @(negedge txc);
    check(st.error_frames == 0, "clean after re-lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
