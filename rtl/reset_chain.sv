// reset_chain: reset that asserts at once and releases in step with a clock.
//
// STAGES flops are preset to 1 by the asynchronous reset_in and shift a 0 in
// from the start of the chain on every clock after reset_in falls; the last
// one's output passes two plain flops to reset_out. reset_out therefore falls
// synchronously, STAGES + 2 clocks after reset_in is released, and stays high
// for at least that long. The preset chain and the two trailing flops follow
// the tester's reset diagram; the chain length is this design's choice
// (8 clocks, also the minimum the embedded processor needs).
//
// Timing: reset_out rises within two clocks of reset_in rising (the trailing
// flops are not preset) and falls STAGES + 2 clocks after it falls.
module reset_chain #(
  parameter int unsigned STAGES = 8
) (
  input  logic clock_in,
  input  logic reset_in,    // asynchronous, active high
  output logic reset_out,   // synchronous to clock_in, active high
  output logic chain_out    // end of the preset chain, before the two flops
);

  initial assert (STAGES >= 2) else $error("reset_chain: STAGES must be >= 2");

  logic [STAGES-1:0] chain;
  logic [1:0]        out_q;

  always_ff @(posedge clock_in or posedge reset_in) begin
    if (reset_in) chain <= '1;
    else          chain <= {chain[STAGES-2:0], 1'b0};
  end

  always_ff @(posedge clock_in) out_q <= {out_q[0], chain[STAGES-1]};

  assign reset_out = out_q[1];
  assign chain_out = chain[STAGES-1];

endmodule
