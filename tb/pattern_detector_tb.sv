// pattern_detector_tb: self-alignment, lock, error counting and abort.
//
// The detector is restarted and fed random words for a random time, then the
// selected pattern from its first word. It must lock within a few clocks of
// the pattern's arrival (two matching words plus pipeline), then count each
// injected error word once, with the right number of wrong bits. Three error
// words in a row must give ABORT, held until the next restart. Runs for
// several patterns. A second instance with LOCK_MATCHES = 4 must lock
// exactly two words later than the default one.
module pattern_detector_tb;
  import bert_ref_pkg::*;
  import bert_pkg::*;

  logic clk = 0, rst = 1;
  logic [19:0] din = '0;
  pattern_e sel = PAT_PRBS7;
  logic wt, lk, ab, fr, er;
  logic [4:0] nb;
  int checks = 0, failures = 0;
  int err_seen = 0, bits_seen = 0, frames_seen = 0, aborts = 0, locks = 0;

  always #5 clk = ~clk;

  pattern_detector u_dut (.clock_in(clk), .reset_in(rst), .data_in(din), .pattern_select_in(sel),
    .wait_out(wt), .lock_out(lk), .abort_out(ab), .frame_out(fr), .error_out(er), .bit_errors(nb));

  // A second detector that needs four matching words before it locks.
  logic wt4, lk4, ab4, fr4, er4;
  logic [4:0] nb4;
  pattern_detector #(.LOCK_MATCHES(4)) u_dut4 (.clock_in(clk), .reset_in(rst), .data_in(din),
    .pattern_select_in(sel), .wait_out(wt4), .lock_out(lk4), .abort_out(ab4), .frame_out(fr4),
    .error_out(er4), .bit_errors(nb4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    if (er) begin err_seen++; bits_seen += nb; end
    if (fr) frames_seen++;
    check(!(er && !fr), "error only on a checked frame");
    check(wt + lk + ab <= 1, "one status at a time");
  end

  task automatic run(pattern_e id, bit do_abort);
    pattern_ref r;
    int lock_at, lock_at4, exp_err, exp_bits;
    bit [19:0] flip;
    r = new(int'(id));
    @(negedge clk);
    rst = 1; sel = id;
    repeat (2) @(negedge clk);
    rst = 0;
    err_seen = 0; bits_seen = 0; frames_seen = 0;
    repeat ($urandom_range(3, 40)) begin din = $urandom(); @(negedge clk); end
    check(wt && !lk, "waiting before the pattern arrives");
    lock_at = -1; lock_at4 = -1; exp_err = 0; exp_bits = 0;
    for (int i = 0; i < 600; i++) begin
      flip = '0;
      if (i > 20 && i % 97 == 0) begin
        int n = $urandom_range(1, 20);
        for (int k = 0; k < n; k++) flip[k] = 1'b1;
        flip = flip << $urandom_range(0, 20 - n);
        exp_err++; exp_bits += n;
      end
      if (do_abort && i >= 300 && i < 303) begin flip = 20'hFFFFF; end
      din = r.next_word() ^ flip;
      @(negedge clk);
      if (lk && lock_at < 0) begin lock_at = i; locks++; end
      if (lk4 && lock_at4 < 0) lock_at4 = i;
    end
    check(lock_at >= 0 && lock_at <= 5, $sformatf("lock %0d words after the first pattern word", lock_at));
    check(lock_at4 == lock_at + 2, $sformatf("four-match lock at %0d, two-match lock at %0d", lock_at4, lock_at));
    if (!do_abort) begin
      check(lk, "still locked");
      check(err_seen == exp_err, $sformatf("error frames %0d vs %0d", err_seen, exp_err));
      check(bits_seen == exp_bits, $sformatf("bit errors %0d vs %0d", bits_seen, exp_bits));
    end else begin
      check(ab && !lk, "abort after three error frames");
      aborts++;
    end
  endtask

  initial begin
    run(PAT_PRBS7, 0);
    run(PAT_PRBS31, 0);
    run(PAT_COUNTER, 0);
    run(PAT_PRBS20ZS, 0);
    run(PAT_PRBS23, 1);
    run(PAT_PRBS9, 0);
    check(locks == 6 && aborts == 1, "all runs locked, one aborted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
