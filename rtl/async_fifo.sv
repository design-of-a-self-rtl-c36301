// async_fifo: small dual-clock FIFO.
//
// Carries a channel's BER statistics from the recovered receive clock to the
// transmit clock. DEPTH entries (8 in the tester, a power of two) sit in a
// dual-port array that maps onto a block RAM. Each side keeps a binary
// pointer with one extra wrap bit and publishes it in Gray code; the other
// side takes it through two synchronizing flops, so only one bit of a
// crossing pointer changes at a time. full and empty are therefore
// pessimistic by the synchronizer delay, never wrong.
//
// The source gives the purpose, the depth and the use of a dual-port block
// RAM; the Gray-pointer scheme is this design's.
//
// Interface: write wr_data when wr_en and !full; read shows the oldest entry
// on rd_data whenever !empty (first-word fall-through) and rd_en pops it.
// Each side has its own synchronous active-high reset; reset both together.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);
  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH) else $error("async_fifo: DEPTH must be a power of two");

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by the write side
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by the read side
  logic [AW:0] wr_bin_next, rd_bin_next;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full        = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});
  assign wr_bin_next = wr_bin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      wr_bin     <= wr_bin_next;
      wr_gray    <= bin2gray(wr_bin_next);
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
    end
  end

  // read side
  assign empty       = (rd_gray == wr_gray_r2);
  assign rd_bin_next = rd_bin + (AW+1)'(rd_en && !empty);
  assign rd_data     = mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      rd_bin     <= rd_bin_next;
      rd_gray    <= bin2gray(rd_bin_next);
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
    end
  end

endmodule
