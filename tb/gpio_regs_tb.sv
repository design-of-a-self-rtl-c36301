// gpio_regs_tb: GPIO write/read protocol and register layout.
//
// Writes use the 00->11->00 pulse and reads the 00->01->00 pulse with ADDR
// and DATA held, as a processor driver would. Checked: control words reach
// the right channel, channel select steers reads, every status word carries
// the right fields (status inputs are random), read data appears two clocks
// after the pulse starts and stays until the next read, reset bits pass
// through, and an operation is taken once however long RD/WR stays set.
module gpio_regs_tb;
  import bert_pkg::*;

  logic clk = 0, rst = 1;
  logic [0:31] gin = '0, gout;
  chan_ctrl_t  ctrl [3];
  logic [2:0]  crst;
  ber_status_t st [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpio_regs u_dut (.clock_in(clk), .reset_in(rst), .gpio_in(gin), .gpio_out(gout),
                   .ctrl_out(ctrl), .chan_reset_out(crst), .status_in(st));

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

  task automatic gpio_write(int addr, logic [23:0] data);
    @(negedge clk);
    gin[2:4] = 3'(addr); gin[8:31] = data; gin[0:1] = 2'b11;
    @(negedge clk);
    gin[0:1] = 2'b00;
    repeat (2) @(negedge clk);
  endtask

  task automatic gpio_read(int addr, output logic [31:0] v);
    @(negedge clk);
    gin[2:4] = 3'(addr); gin[0:1] = 2'b01;
    @(negedge clk);
    gin[0:1] = 2'b00;
    @(negedge clk);      // two clocks after the pulse was driven
    v = gout;
  endtask

  function automatic logic [31:0] expect_status(ber_status_t s, int addr);
    case (addr)
      0: return {3'b0, s.error_frames, s.overflow, s.abort_s, s.lock, s.wait_s};
      1: return s.bit_errors;
      2: return {14'b0, s.total_frames[40:32], s.error_interval[40:32]};
      3: return s.total_frames[31:0];
      4: return s.error_interval[31:0];
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [31:0] v;
    logic [8:0] w [3];
    for (int c = 0; c < 3; c++)
      st[c] = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c < 3; c++) begin
        w[c] = 9'($urandom());
        gpio_write(c, {15'($urandom()), w[c]});
      end
      for (int c = 0; c < 3; c++)
        check(ctrl[c] == chan_ctrl_t'(w[c]), $sformatf("control word of channel %0d", c + 1));
      for (int c = 0; c < 3; c++) begin
        gpio_write(3, 24'(c));
        for (int a = 0; a < 8; a++) begin
          gpio_read(a, v);
          check(v == expect_status(st[c], a), $sformatf("status ch%0d addr %0d: %h", c + 1, a, v));
        end
      end
    end
    // the source's example: write 0x00012c to address 0
    gpio_write(0, 24'h00012c);
    check(ctrl[0].error_insert && ctrl[0].loopback == 2'b10 && ctrl[0].pattern_select == PAT_PRBS32,
          "example control word 0x00012c");
    // read value holds; a long RD level is one read
    gpio_write(3, 24'd1);
    gpio_read(1, v);
    st[1].bit_errors = 32'h1234_5678;
    repeat (3) @(negedge clk);
    check(gout == v, "read value holds until the next read");
    gin[2:4] = 3'd1; gin[0:1] = 2'b01;
    repeat (5) @(negedge clk);
    check(gout == 32'h1234_5678, "read with long pulse");
    st[1].bit_errors = 32'h0;
    repeat (2) @(negedge clk);
    check(gout == 32'h1234_5678, "level read is taken once");
    gin[0:1] = 2'b00;
    // reset bits pass through: 0x02000000 resets channel 2
    @(negedge clk); gin = 32'h0200_0000;
    repeat (2) @(negedge clk);
    check(crst == 3'b010, "channel 2 reset from 0x02000000");
    gin = '0;
    repeat (2) @(negedge clk);
    check(crst == 3'b000, "reset bits released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
