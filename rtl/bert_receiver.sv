// bert_receiver: receive side of one tester channel, on the recovered clock.
//
// Holds the comma detector, the pattern detector and the BER counters. The
// comma detector's enable_comma_align pulse (start of a remote reset) also
// restarts the pattern detector, which then searches for the first word of
// the pattern while the rest of the comma sequence is still arriving. While
// reset_in or the comma detector's rx_reset is high all counters are held at
// zero. Otherwise, for every word checked in lock:
//   total_frames   counts it,
//   error_frames   counts it if it had errors,
//   bit_errors     adds its number of wrong bits; overflow is set (and stays
//                  set until the next clear) when this counter wraps,
//   error_interval is loaded, at each error word, with the number of words
//                  checked between it and the previous error word (or since lock).
// The counter widths are parameters; the defaults are the register map's.
// Counting only checked, locked words and the exact meaning of the interval
// are this design's reading of the source.
//
// Timing: counters change two clocks after the word is at data_in's register
// stage in the pattern detector; all outputs are registered or decoded from
// registered state.
module bert_receiver
  import bert_pkg::*;
#(
  parameter int unsigned       COMMA_RUN      = 64,
  parameter int unsigned       CNT_FRAMES_W       = bert_pkg::FRAMES_W,
  parameter int unsigned       CNT_ERR_FRAMES_W   = bert_pkg::ERR_FRAMES_W,
  parameter int unsigned       CNT_BIT_ERRORS_W   = bert_pkg::BIT_ERRORS_W,
  parameter int unsigned       CNT_INTERVAL_W     = bert_pkg::INTERVAL_W,
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF
) (
  input  logic                    clock_in,          // recovered clock
  input  logic                    reset_in,          // synchronous, active high
  input  logic [DATA_W-1:0]       data_in,
  input  pattern_e                pattern_select,
  input  logic                    comma_detect,
  output logic                    enable_comma_align,
  output logic                    wait_out,
  output logic                    lock_out,
  output logic                    error_out,
  output logic                    abort_out,
  output logic                    overflow_out,
  output logic [CNT_INTERVAL_W-1:0]   error_interval_out,
  output logic [CNT_FRAMES_W-1:0]     total_frames_out,
  output logic [CNT_ERR_FRAMES_W-1:0] frame_errors_out,
  output logic [CNT_BIT_ERRORS_W-1:0] bit_errors_out
);

  logic                rx_reset, restart, clear;
  logic                frame, error;
  logic [BITCNT_W-1:0] nbits;
  logic [CNT_INTERVAL_W-1:0] since_error;
  logic [CNT_BIT_ERRORS_W:0] bit_sum;

  comma_detector #(.COMMA_RUN(COMMA_RUN)) u_comma (
    .clock_in          (clock_in),
    .reset_in          (reset_in),
    .comma_detect      (comma_detect),
    .rx_reset          (rx_reset),
    .enable_comma_align(enable_comma_align)
  );

  assign restart = reset_in || enable_comma_align;
  assign clear   = reset_in || rx_reset;

  pattern_detector #(.USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)) u_detect (
    .clock_in         (clock_in),
    .reset_in         (restart),
    .data_in          (data_in),
    .pattern_select_in(pattern_select),
    .wait_out         (wait_out),
    .lock_out         (lock_out),
    .abort_out        (abort_out),
    .frame_out        (frame),
    .error_out        (error),
    .bit_errors       (nbits)
  );

  assign error_out = error;
  assign bit_sum   = {1'b0, bit_errors_out} + (CNT_BIT_ERRORS_W+1)'(nbits);

  always_ff @(posedge clock_in) begin
    if (clear) begin
      total_frames_out   <= '0;
      frame_errors_out   <= '0;
      bit_errors_out     <= '0;
      overflow_out       <= 1'b0;
      error_interval_out <= '0;
      since_error        <= '0;
    end else if (frame) begin
      total_frames_out <= total_frames_out + 1'b1;
      if (error) begin
        frame_errors_out   <= frame_errors_out + 1'b1;
        bit_errors_out     <= bit_sum[CNT_BIT_ERRORS_W-1:0];
        if (bit_sum[CNT_BIT_ERRORS_W]) overflow_out <= 1'b1;
        error_interval_out <= since_error;
        since_error        <= '0;
      end else begin
        since_error <= since_error + 1'b1;
      end
    end
  end

endmodule
