// pattern_detector: self-aligning checker for the received frames.
//
// A local pattern_gen, identical to the transmitter's, produces the expected
// words. After a restart its output is frozen at the first word of the
// selected pattern while the received stream is searched for it; on a match
// the generator is released and, after one clock that refills its two-stage
// pipeline, the next received word must match too before the detector
// declares LOCK (LOCK_MATCHES, default two, consecutive matches guard
// against a chance match; further matches are checked in CONFIRM). A
// failed confirmation returns to SEARCH with the generator frozen wherever it
// stands, which serves as the new search word. In LOCK every word is compared;
// a mismatching word raises error_out for one clock with bit_errors = number
// of differing bits. Three error words in a row move to ABORT (the link is
// too unstable to measure), which only a restart leaves.
//
// Received words pass one register (data_d) before the search compare and a
// second one (data_d2) before the running compare; the second stage matches
// the generator's output register, so that a match in SEARCH and the
// generator's resumed output line up. The source describes the freeze, the
// search against a delayed copy of the input, the wait and lock indications
// and an abort on burst errors; the number of matches to lock, the number of
// error words to abort and the SYNC/CONFIRM split are this design's.
//
// Outputs wait_out (SEARCH/SYNC/CONFIRM), lock_out and abort_out are decoded
// from registered state; frame_out, error_out and bit_errors are registered
// and describe the word compared one clock earlier.
module pattern_detector
  import bert_pkg::*;
#(
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF,
  parameter int unsigned       LOCK_MATCHES   = 2,   // consecutive matching words to lock (>= 2)
  parameter int unsigned       ABORT_ERRORS   = 3
) (
  input  logic                clock_in,
  input  logic                reset_in,   // synchronous restart, active high
  input  logic [DATA_W-1:0]   data_in,
  input  pattern_e            pattern_select_in,
  output logic                wait_out,
  output logic                lock_out,
  output logic                abort_out,
  output logic                frame_out,  // a word was checked while locked
  output logic                error_out,  // ... and it had errors
  output logic [BITCNT_W-1:0] bit_errors
);

  initial assert (LOCK_MATCHES >= 2 && ABORT_ERRORS >= 1)
    else $error("pattern_detector: unsupported LOCK_MATCHES/ABORT_ERRORS");

  typedef enum logic [2:0] {S_SEARCH, S_SYNC, S_CONFIRM, S_LOCK, S_ABORT} pd_state_e;

  pd_state_e         state;
  logic [DATA_W-1:0] data_d, data_d2, expected, diff;
  logic              gen_enable, match_search, match_run;
  logic [$clog2(ABORT_ERRORS+1)-1:0] err_run;
  logic [$clog2(LOCK_MATCHES)-1:0]   conf_cnt;   // matches after the first
  logic [BITCNT_W-1:0] diff_count;

  pattern_gen #(.USER_PATTERN(USER_PATTERN), .PATTERN_ENABLE(PATTERN_ENABLE)) u_expected (
    .clock_in         (clock_in),
    .reset_in         (reset_in),
    .enable_in        (gen_enable),
    .error_insert_in  (1'b0),
    .pattern_select_in(pattern_select_in),
    .pattern_out      (expected)
  );

  always_ff @(posedge clock_in) begin
    data_d  <= data_in;
    data_d2 <= data_d;
  end

  assign match_search = (data_d == expected);
  assign diff         = data_d2 ^ expected;
  assign match_run    = (diff == '0);

  always_comb begin
    diff_count = '0;
    for (int i = 0; i < DATA_W; i++) diff_count += BITCNT_W'(diff[i]);
  end

  always_comb begin
    unique case (state)
      S_SEARCH:  gen_enable = match_search;
      S_SYNC:    gen_enable = 1'b1;
      S_CONFIRM: gen_enable = match_run;
      S_LOCK:    gen_enable = 1'b1;
      default:   gen_enable = 1'b0;
    endcase
  end

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      state      <= S_SEARCH;
      err_run    <= '0;
      conf_cnt   <= '0;
      frame_out  <= 1'b0;
      error_out  <= 1'b0;
      bit_errors <= '0;
    end else begin
      frame_out  <= 1'b0;
      error_out  <= 1'b0;
      bit_errors <= '0;
      unique case (state)
        S_SEARCH:  if (match_search) state <= S_SYNC;
        S_SYNC: begin
          conf_cnt <= '0;
          state    <= S_CONFIRM;
        end
        S_CONFIRM: begin
          err_run <= '0;
          if (!match_run)
            state <= S_SEARCH;
          else if (conf_cnt == ($bits(conf_cnt))'(LOCK_MATCHES - 2))
            state <= S_LOCK;
          else
            conf_cnt <= conf_cnt + 1'b1;
        end
        S_LOCK: begin
          frame_out <= 1'b1;
          if (match_run) begin
            err_run <= '0;
          end else begin
            error_out  <= 1'b1;
            bit_errors <= diff_count;
            err_run    <= err_run + 1'b1;
            if (err_run == ($bits(err_run))'(ABORT_ERRORS - 1)) state <= S_ABORT;
          end
        end
        S_ABORT: ;
        default: state <= S_SEARCH;
      endcase
    end
  end

  assign wait_out  = (state == S_SEARCH) || (state == S_SYNC) || (state == S_CONFIRM);
  assign lock_out  = (state == S_LOCK);
  assign abort_out = (state == S_ABORT);

endmodule
