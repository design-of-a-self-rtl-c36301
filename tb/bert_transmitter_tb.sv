// bert_transmitter_tb: comma preamble length, pattern start and error insert.
//
// With INIT_WORDS reduced to 64 (as in the source's own simulation) the
// transmitter must send exactly 64 comma words 0x3E8E1 after reset falls,
// then the selected pattern from its first word (checked against the model
// for the 2^20-1 pattern, id 7, and the user word, id 13). A one-clock
// error_insert pulse must invert exactly one word.
module bert_transmitter_tb;
  import bert_ref_pkg::*;
  import bert_pkg::*;

  localparam int INIT = 64;
  logic clk = 0, rst = 1, err = 0;
  pattern_e sel = PAT_PRBS20;
  logic [19:0] dout;
  logic data_state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bert_transmitter #(.INIT_WORDS(INIT)) u_dut (
    .clock_in(clk), .reset_in(rst), .error_insert(err), .pattern_select(sel),
    .data_out(dout), .data_state_out(data_state));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(pattern_e id, int words, int err_at);
    pattern_ref r;
    int commas;
    bit [19:0] e;
    r = new(int'(id));
    @(negedge clk);
    rst = 1; sel = id;
    repeat (3) @(negedge clk);
    check(dout == 20'h3E8E1, "comma during reset");
    rst = 0;
    commas = 0;
    // sample after each rising edge
    while (dout == 20'h3E8E1 && commas < 10 * INIT) begin
      check(!data_state, "comma while not in data state");
      commas++;
      @(negedge clk);
    end
    check(commas == INIT, $sformatf("comma count %0d, expected %0d", commas, INIT));
    for (int i = 0; i < words; i++) begin
      e = r.next_word();
      if (i == err_at + 1) e = ~e;
      check(dout == e, $sformatf("pattern %0d word %0d: %h vs %h", id, i, dout, e));
      check(data_state, "data state");
      err = (i == err_at);
      @(negedge clk);
    end
    err = 0;
  endtask

  initial begin
    run(PAT_PRBS20, 400, 123);
    run(PAT_USER, 50, 10);
    run(PAT_PRBS31, 200, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
