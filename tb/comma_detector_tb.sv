// comma_detector_tb: run length, hold and release of the remote reset.
//
// A cycle-level model of the specified behaviour (64 consecutive commas
// enter, two consecutive non-commas leave, one align pulse per entry) is run
// beside the detector on directed sequences (63 commas, 64 commas, isolated
// non-commas inside the comma stream) and on a long random stream.
module comma_detector_tb;
  logic clk = 0, rst = 1, cd = 0;
  logic rx_reset, align;
  int checks = 0, failures = 0, entries = 0, pulses = 0;

  always #5 clk = ~clk;

  comma_detector u_dut (.clock_in(clk), .reset_in(rst), .comma_detect(cd),
                        .rx_reset(rx_reset), .enable_comma_align(align));

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

  // reference model, registered like the DUT
  bit m_in_comma = 0, m_reset = 0, m_pulse = 0;
  int m_run = 0, m_nc = 0;
  always @(posedge clk) begin
    if (rst) begin
      m_in_comma <= 0; m_reset <= 0; m_pulse <= 0; m_run <= 0; m_nc <= 0;
    end else begin
      m_pulse <= 0;
      if (!m_in_comma) begin
        if (cd) begin
          if (m_run + 1 == 64) begin
            m_in_comma <= 1; m_reset <= 1; m_pulse <= 1; m_run <= 0; m_nc <= 0;
            entries++;
          end else m_run <= m_run + 1;
        end else m_run <= 0;
      end else begin
        if (cd) m_nc <= 0;
        else if (m_nc + 1 == 2) begin m_in_comma <= 0; m_reset <= 0; m_nc <= 0; end
        else m_nc <= m_nc + 1;
      end
    end
  end

  always @(negedge clk) if (!rst) begin
    check(rx_reset == m_reset, "rx_reset");
    check(align == m_pulse, "enable_comma_align");
    if (align) pulses++;
  end

  task automatic send(bit v, int n);
    repeat (n) begin cd = v; @(negedge clk); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send(1, 63); send(0, 5);
    check(!rx_reset, "63 commas are not a reset");
    send(1, 64); send(1, 1);
    check(rx_reset, "64 commas are a reset");
    send(0, 1); send(1, 10); send(0, 1); send(1, 3);
    check(rx_reset, "isolated non-commas keep the reset");
    send(0, 2); send(0, 1);
    check(!rx_reset, "two non-commas release the reset");
    for (int i = 0; i < 20000; i++) begin
      // long comma bursts with some noise, and random data
      if ((i / 500) % 2 == 0) cd = ($urandom_range(0, 99) < 97);
      else                    cd = ($urandom_range(0, 99) < 10);
      @(negedge clk);
    end
    check(entries >= 5, $sformatf("remote resets seen: %0d", entries));
    check(pulses == entries, "one align pulse per remote reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
