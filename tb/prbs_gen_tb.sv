// prbs_gen_tb: checks prbs_gen against a bit-serial LFSR model.
//
// Instance A is the default (2^9-1, 20 bits, not inverted); instance B is
// 2^15-1 inverted; instance C is the zero-suppressed 2^20-1 generator. All
// three are driven by the same random enable. Checked: the reset value (1),
// hold while enable is low, every word against the model, the 511-bit period
// of the 2^9-1 sequence and the 14-zero limit of the suppressed one.
module prbs_gen_tb;
  import bert_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [19:0] a_out, b_out, c_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prbs_gen u_a (.clock_in(clk), .reset_in(rst), .enable_in(en), .data_out(a_out));
  prbs_gen #(.N(20), .LENGTH(15), .INVERT(1), .POLY(32'h6000)) u_b
    (.clock_in(clk), .reset_in(rst), .enable_in(en), .data_out(b_out));
  prbs_gen #(.N(20), .LENGTH(20), .POLY(32'h90000), .ZERO_SUPPRESS(14)) u_c
    (.clock_in(clk), .reset_in(rst), .enable_in(en), .data_out(c_out));

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

  initial begin
    prbs_ref ra, rb, rc;
    bit [19:0] ea, eb, ec, hist[$];
    int zrun;
    ra = new(9, tap(9, 5));
    rb = new(15, tap(15, 14), 1);
    rc = new(20, tap(20, 17), 0, 14);
    repeat (3) @(posedge clk);
    #1;
    check(a_out == 20'd1 && b_out == 20'd1, $sformatf("reset value %h %h", a_out, b_out));
    rst = 0;
    ea = 0; eb = 0; ec = 0;
    zrun = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        ea = ra.next_word(); eb = rb.next_word(); ec = rc.next_word();
        hist.push_back(a_out);
        for (int b = 19; b >= 0; b--) begin
          zrun = c_out[b] ? 0 : zrun + 1;
          check(zrun <= 14, "zero run of suppressed PRBS20");
        end
      end
      if (i > 0 || en) begin
        check(a_out == ea, "PRBS9 word");
        check(b_out == eb, "PRBS15 inverted word");
        check(c_out == ec, "PRBS20 zero-suppressed word");
      end
    end
    // period: 511 words of 20 bits = 20 periods of 511 bits
    for (int i = 0; i + 511 < hist.size(); i++) check(hist[i] == hist[i+511], "PRBS9 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
