// reset_gen: transmit- and receive-clock resets for one tester channel.
//
// A reset_chain turns the asynchronous reset_in into tx_reset_out, released
// synchronously to tx_clock_in. The chain's output is also carried through two
// flops clocked by the recovered rx_clock_in, giving rx_reset_out for the
// receive logic. This is the bottom-bank part of the tester's reset diagram;
// the top bank uses a bare reset_chain.
//
// Timing: tx_reset_out falls STAGES + 2 tx clocks after reset_in falls,
// rx_reset_out two rx clocks after the chain output; both stay high at least
// STAGES clocks, more than the 3 clocks the transceiver needs.
module reset_gen #(
  parameter int unsigned STAGES = 8
) (
  input  logic reset_in,     // asynchronous, active high
  input  logic tx_clock_in,
  input  logic rx_clock_in,
  output logic tx_reset_out,
  output logic rx_reset_out
);

  logic       chain_out;
  logic [1:0] rx_q;

  reset_chain #(.STAGES(STAGES)) u_chain (
    .clock_in (tx_clock_in),
    .reset_in (reset_in),
    .reset_out(tx_reset_out),
    .chain_out(chain_out)     // tapped before the two tx flops, as in the diagram
  );

  always_ff @(posedge rx_clock_in) rx_q <= {rx_q[0], chain_out};

  assign rx_reset_out = rx_q[1];

endmodule
