// reset_gen_tb: asynchronous assertion, synchronous release, durations.
//
// reset_in is pulsed at random times. tx_reset_out must be high within two
// tx clocks and fall exactly STAGES+2 tx clocks after reset_in falls;
// rx_reset_out must be high while reset_in is and fall within two rx clocks
// of the chain end releasing.
module reset_gen_tb;
  localparam int STAGES = 8;
  logic txc = 0, rxc = 0, rin = 0, txr, rxr;
  int checks = 0, failures = 0;

  always #5 txc = ~txc;
  always #6 rxc = ~rxc;

  reset_gen #(.STAGES(STAGES)) u_dut (.reset_in(rin), .tx_clock_in(txc), .rx_clock_in(rxc),
                                      .tx_reset_out(txr), .rx_reset_out(rxr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int k = 0; k < 20; k++) begin
      #($urandom_range(1, 97));
      rin = 1;
      #1;
      repeat (2) @(posedge txc);
      #1 check(txr, "tx reset asserted within two clocks");
      repeat (3) @(posedge rxc);
      #1 check(rxr, "rx reset asserted while reset_in is high");
      #($urandom_range(1, 40));
      rin = 0;
      n = 0;
      while (txr) begin @(posedge txc); #1; n++; end
      check(n == STAGES + 2, $sformatf("tx reset released after %0d clocks", n));
      repeat (4) @(posedge rxc);
      #1 check(!rxr, "rx reset released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
