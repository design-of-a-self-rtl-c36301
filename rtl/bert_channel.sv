// bert_channel: one self-contained BER test channel.
//
// Transmit side (tx_clock_in): the control word selects the pattern; each
// toggle of its error_insert bit becomes a one-clock pulse (edge_detect) that
// inverts one 20-bit frame in the transmitter. tx_data goes to the
// transceiver's parallel input.
// Receive side (rx_clock_in, recovered by the transceiver): bert_receiver
// checks rx_data, pulses enable_comma_align on a remote reset and keeps the
// BER counters. The pattern select is brought into this domain through two
// flops (it only changes while the link is being set up).
// Crossing back: on every rx clock with room, a snapshot of the statistics is
// written into an 8-deep async_fifo; on every tx clock with data, the oldest
// snapshot is read into status_out. So status_out trails the receiver by a
// few clocks and is always one consistent snapshot.
// Transceiver controls (loopback, tx_inhibit, powerdown) are passed through
// from the control word; mgt_reset is the channel's tx reset.
//
// The partitioning (transmitter, receiver, error-insert edge detector, 8-deep
// FIFO to the transmit clock) follows the source; the snapshot-every-clock
// use of the FIFO and the pattern-select synchronizer are this design's.
//
// Resets: tx_reset_in and rx_reset_in are synchronous to their clocks (from
// reset_gen).
module bert_channel
  import bert_pkg::*;
#(
  parameter int unsigned       INIT_WORDS     = 262144,
  parameter int unsigned       COMMA_RUN      = 64,
  parameter logic [DATA_W-1:0] COMMA          = DEFAULT_COMMA,
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF,
  parameter int unsigned       FIFO_DEPTH     = 8
) (
  input  logic              tx_clock_in,
  input  logic              tx_reset_in,
  input  logic              rx_clock_in,
  input  logic              rx_reset_in,
  input  chan_ctrl_t        ctrl_in,
  output ber_status_t       status_out,      // tx_clock_in domain
  // transceiver side
  output logic [DATA_W-1:0] tx_data,
  input  logic [DATA_W-1:0] rx_data,
  input  logic              comma_detect,
  output logic              enable_comma_align,
  output logic [1:0]        loopback,
  output logic              tx_inhibit,
  output logic              powerdown,
  output logic              mgt_reset
);

  localparam int unsigned SW = $bits(ber_status_t);

  logic        err_pulse;
  pattern_e    sel_rx_q1, sel_rx_q2;
  ber_status_t rx_status, fifo_out;
  logic        fifo_empty;

  edge_detect u_edge (
    .clock_in (tx_clock_in),
    .reset_in (tx_reset_in),
    .level_in (ctrl_in.error_insert),
    .pulse_out(err_pulse)
  );

  bert_transmitter #(
    .INIT_WORDS(INIT_WORDS), .COMMA(COMMA),
    .USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)
  ) u_tx (
    .clock_in      (tx_clock_in),
    .reset_in      (tx_reset_in),
    .error_insert  (err_pulse),
    .pattern_select(ctrl_in.pattern_select),
    .data_out      (tx_data),
    .data_state_out()
  );

  always_ff @(posedge rx_clock_in) begin
    sel_rx_q1 <= ctrl_in.pattern_select;
    sel_rx_q2 <= sel_rx_q1;
  end

  bert_receiver #(
    .COMMA_RUN(COMMA_RUN), .USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)
  ) u_rx (
    .clock_in          (rx_clock_in),
    .reset_in          (rx_reset_in),
    .data_in           (rx_data),
    .pattern_select    (sel_rx_q2),
    .comma_detect      (comma_detect),
    .enable_comma_align(enable_comma_align),
    .wait_out          (rx_status.wait_s),
    .lock_out          (rx_status.lock),
    .error_out         (),
    .abort_out         (rx_status.abort_s),
    .overflow_out      (rx_status.overflow),
    .error_interval_out(rx_status.error_interval),
    .total_frames_out  (rx_status.total_frames),
    .frame_errors_out  (rx_status.error_frames),
    .bit_errors_out    (rx_status.bit_errors)
  );

  async_fifo #(.WIDTH(SW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk (rx_clock_in),
    .wr_rst (rx_reset_in),
    .wr_en  (1'b1),
    .wr_data(rx_status),
    .full   (),           // a full FIFO simply drops snapshots
    .rd_clk (tx_clock_in),
    .rd_rst (tx_reset_in),
    .rd_en  (1'b1),
    .rd_data(fifo_out),
    .empty  (fifo_empty)
  );

  always_ff @(posedge tx_clock_in) begin
    if (tx_reset_in)      status_out <= '0;
    else if (!fifo_empty) status_out <= fifo_out;
  end

  assign loopback   = ctrl_in.loopback;
  assign tx_inhibit = ctrl_in.tx_inhibit;
  assign powerdown  = ctrl_in.powerdown;
  assign mgt_reset  = tx_reset_in;

endmodule
