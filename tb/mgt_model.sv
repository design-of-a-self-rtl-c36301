// mgt_model: behavioural stand-in for one serial transceiver looped back.
//
// Words written on tx_clk are queued as a serial line; each rx_clk edge takes
// one word off the queue (once two are waiting) and shifts it into a 40-bit
// history. The parallel receive word is the 20-bit window SLIP bits away from
// the true word boundary until enable_comma_align is seen while a comma sits
// somewhere in the history; then the window moves onto that comma, as the real
// transceiver's comma alignment does. comma_detect flags a comma anywhere in
// the history. tx_inhibit sends zeros. flip_mask is XORed into the next word
// taken off the line (error injection by the testbench).
module mgt_model #(
  parameter int unsigned SLIP  = 7,
  parameter logic [19:0] COMMA = 20'h3E8E1
) (
  input  logic        tx_clk,
  input  logic [19:0] tx_data,
  input  logic        tx_inhibit,
  input  logic        rx_clk,
  input  logic        enable_comma_align,
  input  logic [19:0] flip_mask,
  output logic [19:0] rx_data,
  output logic        comma_detect
);

  logic [19:0] line[$];
  logic [39:0] hist = '0;
  int unsigned slip = SLIP;
  int          found;
  int unsigned aligns = 0;

  always @(posedge tx_clk) line.push_back(tx_inhibit ? 20'h0 : tx_data);

  always_comb begin
    found = -1;
    for (int a = 0; a < 20; a++)
      if (hist[a +: 20] == COMMA) found = a;
  end

  always @(posedge rx_clk) begin
    logic [39:0] h;
    h = hist;
    if (line.size() > 2) h = {hist[19:0], line.pop_front() ^ flip_mask};
    if (enable_comma_align && found >= 0) begin
      slip = found;
      aligns++;
    end
    hist         <= h;
    rx_data      <= h[slip +: 20];
    comma_detect <= (found >= 0);
  end

  initial begin
    rx_data      = '0;
    comma_detect = 1'b0;
  end

endmodule
