// async_fifo_tb: order, no loss and no duplication across unrelated clocks.
//
// Writer (period 10) and reader (period 13, then 7) push random data with
// random enables; every word read must be the next one written, full must
// stop writes at 8 entries and empty must stop reads.
module async_fifo_tb;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, we = 0, re = 0, full, empty;
  logic [31:0] wd, rd;
  int checks = 0, failures = 0, written = 0, readn = 0, max_fill = 0, saw_full = 0;
  logic [31:0] q[$];
  int rhalf = 6;

  always #5 wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  async_fifo u_dut (.wr_clk(wclk), .wr_rst(wrst), .wr_en(we), .wr_data(wd), .full(full),
                    .rd_clk(rclk), .rd_rst(rrst), .rd_en(re), .rd_data(rd), .empty(empty));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wclk) if (!wrst) begin
    if (we && !full) begin q.push_back(wd); written++; end
    if (full) saw_full++;
    check(q.size() - 0 <= 8, "never more than 8 entries");
  end

  always @(posedge rclk) if (!rrst) begin
    if (re && !empty) begin
      check(q.size() > 0, "read only what was written");
      if (q.size() > 0) check(rd == q.pop_front(), "data in order");
      readn++;
    end
  end

  always @(negedge wclk) begin we = ($urandom_range(0, 3) != 0); wd = $urandom(); end
  always @(negedge rclk) re = (readn < 1500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);

  initial begin
    #100; wrst = 0; rrst = 0;
    wait (readn >= 1500);
    rhalf = 3;
    wait (readn >= 4000);
    check(saw_full > 0, "full reached while the reader was slow");
    check(written >= readn, "counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
