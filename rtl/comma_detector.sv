// comma_detector: recognises the transmitter's comma sequence as a remote reset.
//
// comma_detect is the transceiver's per-word "comma seen" flag. In WAIT the
// detector counts consecutive comma words; the COMMA_RUN-th in a row moves it
// to COMMA. On that entry it pulses enable_comma_align for one clock (the
// transceiver then re-aligns its word boundary) and raises rx_reset, which
// clears the receive statistics. rx_reset stays high until two consecutive
// non-comma words arrive, so scattered errors inside the comma stream cannot
// split it into several resets; then the detector returns to WAIT.
//
// COMMA_RUN = 64 and the two-word release follow the source; the counter
// and the state encoding are this design's.
//
// Timing: outputs are registered; rx_reset rises one clock after the
// COMMA_RUN-th comma and falls one clock after the second non-comma word.
module comma_detector #(
  parameter int unsigned COMMA_RUN = 64
) (
  input  logic clock_in,
  input  logic reset_in,            // synchronous, active high
  input  logic comma_detect,
  output logic rx_reset,            // level: receive statistics held clear
  output logic enable_comma_align   // one-clock pulse on entering COMMA
);

  initial assert (COMMA_RUN >= 1) else $error("comma_detector: COMMA_RUN must be >= 1");

  typedef enum logic {S_WAIT, S_COMMA} cd_state_e;

  localparam int unsigned CW = $clog2(COMMA_RUN + 1);

  cd_state_e   state;
  logic [CW-1:0] comma_run;
  logic        non_comma_seen;      // one non-comma word seen while in COMMA

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      state              <= S_WAIT;
      comma_run          <= '0;
      non_comma_seen     <= 1'b0;
      rx_reset           <= 1'b0;
      enable_comma_align <= 1'b0;
    end else begin
      enable_comma_align <= 1'b0;
      unique case (state)
        S_WAIT: begin
          if (!comma_detect) begin
            comma_run <= '0;
          end else if (comma_run == CW'(COMMA_RUN - 1)) begin
            state              <= S_COMMA;
            comma_run          <= '0;
            non_comma_seen     <= 1'b0;
            rx_reset           <= 1'b1;
            enable_comma_align <= 1'b1;
          end else begin
            comma_run <= comma_run + 1'b1;
          end
        end
        S_COMMA: begin
          if (comma_detect) begin
            non_comma_seen <= 1'b0;
          end else if (non_comma_seen) begin
            state    <= S_WAIT;
            rx_reset <= 1'b0;
          end else begin
            non_comma_seen <= 1'b1;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
