// bert_transmitter: frame source of one tester channel.
//
// After reset the transmitter sends INIT_WORDS copies of the COMMA word, which
// the far end uses to find word boundaries and as a remote reset, then the
// pattern chosen by pattern_select. A three-state machine (RESET -> INIT ->
// DATA) drives the output multiplexer, holds the pattern generator in reset
// during its RESET state, and enables the generator from the last INIT clock
// on, so that the first DATA word is the first word of the pattern.
// error_insert inverts all 20 bits of one output word per clock it is high.
//
// Following the source: INIT_WORDS = 2^18, COMMA = 0x3E8E1, the state names
// and the comma-then-pattern order. This design's choices: exactly INIT_WORDS
// comma words leave after reset_in falls (the RESET state's word included),
// and the generator is restarted only on a reset, so changing pattern_select
// on the fly switches patterns without a new comma sequence.
//
// Timing: data_out is a multiplexer of registered signals; an error_insert
// pulse inverts the word of the following clock.
module bert_transmitter
  import bert_pkg::*;
#(
  parameter int unsigned       INIT_WORDS     = 262144,
  parameter logic [DATA_W-1:0] COMMA          = DEFAULT_COMMA,
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF
) (
  input  logic              clock_in,
  input  logic              reset_in,        // synchronous, active high
  input  logic              error_insert,
  input  pattern_e          pattern_select,
  output logic [DATA_W-1:0] data_out,
  output logic              data_state_out   // pattern (not comma) words leaving
);

  initial assert (INIT_WORDS >= 3) else $error("bert_transmitter: INIT_WORDS must be >= 3");

  typedef enum logic [1:0] {S_RESET, S_INIT, S_DATA} tx_state_e;

  tx_state_e         state;
  logic [31:0]       count;
  logic              pg_reset, pg_enable;
  logic [DATA_W-1:0] pattern;

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      state <= S_RESET;
      count <= '0;
    end else begin
      unique case (state)
        S_RESET: begin
          state <= S_INIT;
          count <= 32'd1;
        end
        S_INIT: begin
          if (count == INIT_WORDS - 1) state <= S_DATA;
          else                         count <= count + 1;
        end
        S_DATA: ;
        default: state <= S_RESET;
      endcase
    end
  end

  assign pg_reset  = reset_in || (state == S_RESET);
  assign pg_enable = (state == S_DATA) || (state == S_INIT && count == INIT_WORDS - 1);

  pattern_gen #(.USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)) u_pattern (
    .clock_in         (clock_in),
    .reset_in         (pg_reset),
    .enable_in        (pg_enable),
    .error_insert_in  (error_insert),
    .pattern_select_in(pattern_select),
    .pattern_out      (pattern)
  );

  assign data_state_out = (state == S_DATA);
  assign data_out       = data_state_out ? pattern : COMMA;

endmodule
