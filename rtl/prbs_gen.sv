// prbs_gen: parameterizable PRBS generator producing N bits per clock.
//
// A LENGTH-stage Fibonacci LFSR: every bit step the stages selected by POLY
// (bit k-1 of POLY = stage k) are XORed and shifted into stage 1, everything
// else moves one stage on. N such steps are unrolled in one clock, so one
// N-bit word leaves per enabled clock. data_out[N-1] is the oldest bit of the
// word, the one to be serialized first. INVERT complements the output. As in
// the tester's generator diagram, reset loads all ones into the LFSR and 1
// into the output register; when enable_in is low the output holds its value.
//
// Design choices not fixed by the source description: the LFSR state also
// holds while enable_in is low (the receive side relies on freezing the
// expected sequence and resuming it without a gap), and ZERO_SUPPRESS > 0
// forces an output bit to one whenever the previous ZERO_SUPPRESS LFSR bits
// were all zero, which bounds runs of zeros at ZERO_SUPPRESS (used for the
// zero-suppressed 2^20-1 pattern, ZERO_SUPPRESS = 14).
//
// Timing: one clock from enable_in to a new data_out word.
module prbs_gen #(
  parameter int unsigned N             = 20,
  parameter int unsigned LENGTH        = 9,
  parameter bit          INVERT        = 1'b0,
  parameter logic [31:0] POLY          = 32'b1_0001_0000,
  parameter int unsigned ZERO_SUPPRESS = 0
) (
  input  logic         clock_in,
  input  logic         reset_in,   // synchronous, active high
  input  logic         enable_in,
  output logic [N-1:0] data_out
);

  initial begin
    assert (LENGTH >= 2 && LENGTH <= 32) else $error("prbs_gen: LENGTH out of range");
    assert (ZERO_SUPPRESS < LENGTH) else $error("prbs_gen: ZERO_SUPPRESS too large");
  end

  logic [LENGTH-1:0] state;        // state[k-1] is stage k; stage 1 gets the feedback
  logic [LENGTH-1:0] state_next;
  logic [N-1:0]      word_next;

  always_comb begin
    logic [LENGTH-1:0] s;
    logic              fb;
    s = state;
    for (int i = 0; i < N; i++) begin
      fb = ^(s & POLY[LENGTH-1:0]);
      if (ZERO_SUPPRESS > 0 && s[(ZERO_SUPPRESS > 0 ? ZERO_SUPPRESS : 1)-1:0] == '0)
        word_next[N-1-i] = 1'b1;
      else
        word_next[N-1-i] = fb;
      s = {s[LENGTH-2:0], fb};
    end
    state_next = s;
  end

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      state    <= '1;
      data_out <= N'(1);
    end else if (enable_in) begin
      state    <= state_next;
      data_out <= INVERT ? ~word_next : word_next;
    end
  end

endmodule
