// multi_bert: the multi-channel bit-error-rate tester (top level).
//
// NUM_CHANNELS (3) independent BER channels share one transmit clock and are
// configured and read through a 32-bit GPIO register interface, meant for an
// embedded processor. Each channel sends a selectable PRBS/clock/user/counter
// pattern to its serial transceiver, checks what comes back on the clock the
// transceiver recovers, and counts frames, error frames, bit errors and the
// interval between errors. Two further transceivers on the other FPGA bank
// ("clock channels", on tx_clock_top) are fed the fixed word 1010...10 and so
// send a serial clock at half their bit rate; run at twice the data
// channels' reference clock, they give a clock at the data bit rate for
// source-synchronous receivers.
//
// Inside: gpio_regs (address map), one reset_gen per channel (reset = system
// RESET or the channel's GPIO reset bit) and one reset_chain for the top
// bank, the bert_channel instances and the clock-channel word registers.
// leds[5:0] = {lock3, wait3, lock2, wait2, lock1, wait1}; leds[7:6] = 0.
//
// The serial transceivers (serializer, clock recovery, comma alignment) are
// hard macros outside this RTL: their parallel-side signals are the mgt_*
// ports, one array element per channel. Their reference clocks never reach
// this logic and are therefore not ports here. Clock channel outputs are
// clk_chan_*.
//
// Clocks: tx_clock (75 MHz in the reference build: 20-bit frames give
// 1.5 Gb/s), mgt_rx_clock[i] (recovered, same frequency, any phase) and
// tx_clock_top (150 MHz, clock channels). reset and reset_top are
// asynchronous, active high.
module multi_bert
  import bert_pkg::*;
#(
  parameter int unsigned       NUM_CHANNELS   = 3,
  parameter int unsigned       NUM_CLK_CHANS  = 2,
  parameter int unsigned       INIT_WORDS     = 262144,
  parameter int unsigned       COMMA_RUN      = 64,
  parameter int unsigned       RESET_STAGES   = 8,
  parameter logic [DATA_W-1:0] COMMA          = DEFAULT_COMMA,
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF
) (
  input  logic              tx_clock,
  input  logic              reset,
  input  logic              tx_clock_top,
  input  logic              reset_top,
  input  logic [0:31]       gpio_in,
  output logic [0:31]       gpio_out,
  output logic [7:0]        leds,
  // data-channel transceivers
  output logic [DATA_W-1:0] mgt_tx_data           [NUM_CHANNELS],
  input  logic [DATA_W-1:0] mgt_rx_data           [NUM_CHANNELS],
  input  logic              mgt_rx_clock          [NUM_CHANNELS],
  input  logic              mgt_comma_detect      [NUM_CHANNELS],
  output logic              mgt_enable_comma_align[NUM_CHANNELS],
  output logic [1:0]        mgt_loopback          [NUM_CHANNELS],
  output logic              mgt_tx_inhibit        [NUM_CHANNELS],
  output logic              mgt_powerdown         [NUM_CHANNELS],
  output logic              mgt_reset             [NUM_CHANNELS],
  // clock-channel transceivers (top bank)
  output logic [DATA_W-1:0] clk_chan_tx_data      [NUM_CLK_CHANS],
  output logic              clk_chan_reset
);

  initial assert (NUM_CHANNELS >= 1 && NUM_CHANNELS <= 3)
    else $error("multi_bert: 1 to 3 channels");

  logic                    sys_tx_reset, unused_sys_rx_reset, unused_top_chain;
  logic                    top_reset;
  chan_ctrl_t              ctrl   [NUM_CHANNELS];
  ber_status_t             status [NUM_CHANNELS];
  logic [NUM_CHANNELS-1:0] gpio_chan_reset;

  // register interface runs on the system tx reset
  reset_gen #(.STAGES(RESET_STAGES)) u_sys_reset (
    .reset_in    (reset),
    .tx_clock_in (tx_clock),
    .rx_clock_in (tx_clock),
    .tx_reset_out(sys_tx_reset),
    .rx_reset_out(unused_sys_rx_reset)
  );

  gpio_regs #(.NUM_CHANNELS(NUM_CHANNELS)) u_regs (
    .clock_in      (tx_clock),
    .reset_in      (sys_tx_reset),
    .gpio_in       (gpio_in),
    .gpio_out      (gpio_out),
    .ctrl_out      (ctrl),
    .chan_reset_out(gpio_chan_reset),
    .status_in     (status)
  );

  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_chan
    logic tx_rst, rx_rst;

    reset_gen #(.STAGES(RESET_STAGES)) u_reset (
      .reset_in    (reset || gpio_chan_reset[c]),
      .tx_clock_in (tx_clock),
      .rx_clock_in (mgt_rx_clock[c]),
      .tx_reset_out(tx_rst),
      .rx_reset_out(rx_rst)
    );

    bert_channel #(
      .INIT_WORDS(INIT_WORDS), .COMMA_RUN(COMMA_RUN), .COMMA(COMMA),
      .USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)
    ) u_channel (
      .tx_clock_in       (tx_clock),
      .tx_reset_in       (tx_rst),
      .rx_clock_in       (mgt_rx_clock[c]),
      .rx_reset_in       (rx_rst),
      .ctrl_in           (ctrl[c]),
      .status_out        (status[c]),
      .tx_data           (mgt_tx_data[c]),
      .rx_data           (mgt_rx_data[c]),
      .comma_detect      (mgt_comma_detect[c]),
      .enable_comma_align(mgt_enable_comma_align[c]),
      .loopback          (mgt_loopback[c]),
      .tx_inhibit        (mgt_tx_inhibit[c]),
      .powerdown         (mgt_powerdown[c]),
      .mgt_reset         (mgt_reset[c])
    );
  end

  always_comb begin
    leds = '0;
    for (int c = 0; c < NUM_CHANNELS; c++) begin
      leds[2*c]   = status[c].wait_s;
      leds[2*c+1] = status[c].lock;
    end
  end

  // top bank: clock channels
  reset_chain #(.STAGES(RESET_STAGES)) u_top_reset (
    .clock_in (tx_clock_top),
    .reset_in (reset_top),
    .reset_out(top_reset),
    .chain_out(unused_top_chain)
  );

  always_ff @(posedge tx_clock_top) begin
    for (int k = 0; k < NUM_CLK_CHANS; k++)
      clk_chan_tx_data[k] <= top_reset ? '0 : CLK2_WORD;
  end

  assign clk_chan_reset = top_reset;

endmodule
