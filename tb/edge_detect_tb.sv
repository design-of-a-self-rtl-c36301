// edge_detect_tb: one pulse per toggle, whatever the time between toggles.
module edge_detect_tb;
  logic clk = 0, rst = 1, lvl = 0, pulse;
  int checks = 0, failures = 0, toggles = 0, pulses = 0;
  logic prev = 0, prev2 = 0;

  always #5 clk = ~clk;

  edge_detect u_dut (.clock_in(clk), .reset_in(rst), .level_in(lvl), .pulse_out(pulse));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pulse must appear exactly one clock after the level change is sampled
  always @(posedge clk) if (!rst) begin
    #1;
    check(pulse == (prev ^ prev2), "pulse follows a toggle by one clock");
    if (pulse) pulses++;
  end
  always @(posedge clk) begin prev2 <= prev; prev <= lvl; end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      repeat ($urandom_range(1, 6)) @(negedge clk);
      lvl = ~lvl;
      toggles++;
    end
    repeat (3) @(negedge clk);
    check(pulses == toggles, $sformatf("%0d pulses for %0d toggles", pulses, toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
