// gpio_regs: address-map logic between a 32-bit GPIO port and the channels.
//
// A processor drives gpio_in and reads gpio_out. Both are numbered [0:31],
// bit 0 being the most significant, as on the processor's bus. Fields of
// gpio_in:
//   [0:1]  RD/WR  a one-clock pulse 00->11->00 writes, 00->01->00 reads
//   [2:4]  ADDR   register address
//   [5:7]  RESET  level resets for channels 1..3 (passed straight on)
//   [8:31] DATA   24-bit write data (bit 31 is DATA bit 0)
// Writes: ADDR 0..NUM_CHANNELS-1 load that channel's control word from DATA
// bits [8:0] (error insert, power-down, TX inhibit, loopback, pattern select);
// ADDR 3 loads the channel-select register from DATA bits [1:0].
// Reads return, for the selected channel, status word ADDR:
//   0  {3'b0, error_frames[24:0], overflow, abort, lock, wait}
//   1  bit_errors[31:0]
//   2  {14'b0, total_frames[40:32], error_interval[40:32]}
//   3  total_frames[31:0]
//   4  error_interval[31:0]
//   5..7 zero
// The field layout, the pulse protocol and the status words 0..4 follow the
// tester's register tables; bit 0 of word 0 ("wait") and the zero words 5..7
// are this design's choices where the tables are silent.
//
// Timing: gpio_in is registered once; a pulse is recognised by comparing that
// register with its previous value, so ADDR and DATA must be held for two
// clocks from the pulse, as the protocol demands. A write takes effect, and
// gpio_out shows the read value, two clocks after the pulse is first driven.
module gpio_regs
  import bert_pkg::*;
#(
  parameter int unsigned NUM_CHANNELS = 3
) (
  input  logic        clock_in,
  input  logic        reset_in,                        // synchronous, active high
  input  logic [0:31] gpio_in,
  output logic [0:31] gpio_out,
  output chan_ctrl_t  ctrl_out     [NUM_CHANNELS],
  output logic [NUM_CHANNELS-1:0] chan_reset_out,      // bit i: channel i+1
  input  ber_status_t status_in    [NUM_CHANNELS]
);

  initial assert (NUM_CHANNELS >= 1 && NUM_CHANNELS <= 3)
    else $error("gpio_regs: 1 to 3 channels are addressable");

  localparam logic [1:0] OP_WRITE = 2'b11;
  localparam logic [1:0] OP_READ  = 2'b01;

  logic [0:31] in_q;
  logic [1:0]  op_q, op_prev;
  logic [2:0]  addr;
  logic [23:0] wdata;
  logic [1:0]  chan_sel;
  ber_status_t st;
  logic [31:0] rdata;

  assign op_q  = in_q[0:1];
  assign addr  = in_q[2:4];
  assign wdata = in_q[8:31];

  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      in_q    <= '0;
      op_prev <= '0;
    end else begin
      in_q    <= gpio_in;
      op_prev <= op_q;
    end
  end

  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_rst
    assign chan_reset_out[c] = in_q[5+c];
  end

  // control registers
  always_ff @(posedge clock_in) begin
    if (reset_in) begin
      chan_sel <= '0;
      for (int c = 0; c < NUM_CHANNELS; c++) ctrl_out[c] <= '0;
    end else if (op_q == OP_WRITE && op_prev != OP_WRITE) begin
      if (addr == 3'd3)
        chan_sel <= wdata[1:0];
      else
        for (int c = 0; c < NUM_CHANNELS; c++)
          if (addr == 3'(c)) ctrl_out[c] <= chan_ctrl_t'(wdata[8:0]);
    end
  end

  // status read-back
  always_comb begin
    st = '0;
    for (int c = 0; c < NUM_CHANNELS; c++)
      if (chan_sel == 2'(c)) st = status_in[c];
    unique case (addr)
      3'd0:    rdata = {3'b0, st.error_frames, st.overflow, st.abort_s, st.lock, st.wait_s};
      3'd1:    rdata = st.bit_errors;
      3'd2:    rdata = {14'b0, st.total_frames[40:32], st.error_interval[40:32]};
      3'd3:    rdata = st.total_frames[31:0];
      3'd4:    rdata = st.error_interval[31:0];
      default: rdata = '0;
    endcase
  end

  always_ff @(posedge clock_in) begin
    if (reset_in)                                    gpio_out <= '0;
    else if (op_q == OP_READ && op_prev != OP_READ)  gpio_out <= rdata;
  end

endmodule
