// bert_receiver_tb: remote reset, lock and the four BER counters.
//
// A stream of 100 comma words (comma_detect high) followed by a pattern is
// fed in; the receiver must pulse enable_comma_align once, lock, and count
// every locked word. Error words with known bit counts are injected; the
// error-frame count, bit-error sum and the interval between the last two
// error words are compared with values computed here. The bit-error counter
// is narrowed to 8 bits so that its overflow flag is also exercised. A
// second comma sequence must clear the counters and re-lock.
module bert_receiver_tb;
  import bert_ref_pkg::*;
  import bert_pkg::*;

  localparam logic [19:0] COMMA = 20'h3E8E1;
  logic clk = 0, rst = 1, cd = 0;
  logic [19:0] din = '0;
  pattern_e sel = PAT_PRBS15;
  logic align, wt, lk, er, ab, ov;
  logic [40:0] interval, total;
  logic [24:0] eframes;
  logic [7:0]  bits;
  int checks = 0, failures = 0, aligns = 0;

  always #5 clk = ~clk;

  bert_receiver #(.CNT_BIT_ERRORS_W(8)) u_dut (
    .clock_in(clk), .reset_in(rst), .data_in(din), .pattern_select(sel), .comma_detect(cd),
    .enable_comma_align(align), .wait_out(wt), .lock_out(lk), .error_out(er), .abort_out(ab),
    .overflow_out(ov), .error_interval_out(interval), .total_frames_out(total),
    .frame_errors_out(eframes), .bit_errors_out(bits));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (align) aligns++;

  task automatic session(int words, int err_every, int nbits);
    pattern_ref r;
    bit [19:0] flip;
    r = new(int'(sel));
    repeat (100) begin din = COMMA; cd = 1; @(negedge clk); end
    check(!lk && total == 0, "counters clear during comma sequence");
    for (int i = 0; i < words; i++) begin
      cd = 0;
      flip = '0;
      if (lk && i % err_every == err_every - 1) begin
        for (int k = 0; k < nbits; k++) flip[k] = 1;
        flip = flip << (i % (21 - nbits));
      end
      din = r.next_word() ^ flip;
      @(negedge clk);
    end
    // drain the pipeline: three more correct words
    repeat (3) begin din = r.next_word(); @(negedge clk); end
    check(lk, "locked at end of session");
    $display("frames=%0d error_frames=%0d bits=%0d ov=%0d interval=%0d",
             total, eframes, bits, ov, interval);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    session(2000, 50, 7);
    // words checked in lock = words sent after lock; errors every 50th word
    check(eframes > 30 && eframes <= 40, "error frame count range");
    check(total > 1990 && total <= 2003, "total frames");
    check(interval == 49, $sformatf("error interval %0d, expected 49", interval));
    check(ov, "8-bit bit-error counter overflowed");
    check(bits == 8'((eframes * 7) % 256), $sformatf("bit errors mod 256: %0d", bits));
    check(aligns == 1, "one align pulse");
    // second session: new remote reset clears everything
    sel = PAT_PRBS9;
    session(500, 250, 3);
    check(aligns == 2, "second align pulse");
    check(eframes == 2 && bits == 6 && !ov && interval == 249, "counters restarted, two errors of 3 bits");
    check(total > 490 && total <= 503, "total frames after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
