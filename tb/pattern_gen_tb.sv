// pattern_gen_tb: all sixteen patterns against the reference model.
//
// For every pattern id: reset, wait for the pre-enabled first word, then run
// 300 words with a random enable and compare each with the model, checking
// that the output holds while enable is low and follows an enable after two
// clocks. Then error_insert must invert exactly the next word, the user word
// 0xC1554 must become 0x3EAAB, and a cleared PATTERN_ENABLE bit must read 0.
module pattern_gen_tb;
  import bert_ref_pkg::*;
  import bert_pkg::*;

  logic clk = 0, rst = 1, en = 0, err = 0;
  pattern_e sel = PAT_CLK2;
  logic [19:0] out, out_small;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_gen u_dut (.clock_in(clk), .reset_in(rst), .enable_in(en), .error_insert_in(err),
                     .pattern_select_in(sel), .pattern_out(out));
  pattern_gen #(.PATTERN_ENABLE(16'h7FFF)) u_small (.clock_in(clk), .reset_in(rst), .enable_in(en),
                     .error_insert_in(1'b0), .pattern_select_in(sel), .pattern_out(out_small));

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

  initial begin
    pattern_ref r;
    bit [19:0] exp_q[$];   // expected words, in output order
    bit [19:0] cur;
    bit en_d1, en_d2;
    for (int id = 0; id < 16; id++) begin
      @(negedge clk);
      rst = 1; en = 0; sel = pattern_e'(id);
      repeat (2) @(negedge clk);
      rst = 0;
      repeat (3) @(negedge clk);
      r = new(id);
      cur = r.next_word();
      check(out == cur, $sformatf("first word of pattern %0d", id));
      en_d1 = 0; en_d2 = 0;
      for (int i = 0; i < 300; i++) begin
        en = ($urandom_range(0, 2) != 0);
        @(negedge clk);
        // an enable two clocks ago has reached the output now
        if (en_d1) cur = r.next_word();
        check(out == cur, $sformatf("pattern %0d word %0d", id, i));
        en_d2 = en_d1; en_d1 = en;
      end
      en = 0;
      @(negedge clk);
      if (en_d1) cur = r.next_word();
      @(negedge clk);
      check(out == cur, "hold after enable low");
      err = 1;
      @(negedge clk);
      err = 0;
      check(out == ~cur, $sformatf("error insert pattern %0d", id));
      if (id == 13) check(out == 20'h3EAAB, "inverted user word 0x3EAAB");
      @(negedge clk);
      check(out == cur, "single inverted word");
      if (id == 13) check(out == 20'hC1554, "user word 0xC1554");
      if (id == 15) check(out_small == 20'h0, "pattern left out reads zero");
      else          check(out_small == out, "pattern kept when enabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
