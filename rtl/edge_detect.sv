// edge_detect: one-clock pulse for every change of a level input.
//
// Used on a channel's error_insert control bit: each toggle of the bit, in
// either direction, gives exactly one pulse, so the transmitter inverts one
// frame per toggle however long the bit stays at its new value (as the source
// requires). The flop is cleared by reset, so a level already high when reset
// falls also counts as a toggle.
//
// Timing: pulse_out is registered, high in the clock after the change is seen.
module edge_detect (
  input  logic clock_in,
  input  logic reset_in,   // synchronous, active high
  input  logic level_in,
  output logic pulse_out
);

  logic level_q;

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      level_q   <= 1'b0;
      pulse_out <= 1'b0;
    end else begin
      level_q   <= level_in;
      pulse_out <= level_in ^ level_q;
    end
  end

endmodule
