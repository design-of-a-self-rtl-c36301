// pattern_gen: the tester's 16-way pattern source.
//
// Sixteen pattern blocks run side by side: four constant clock words (1/2,
// 1/4, 1/10 and 1/20 of the serial rate), ten PRBS generators (prbs_gen
// instances with the polynomials and inversions of the pattern table), a
// constant user word and a 20-bit incrementing counter. pattern_select_in
// picks one; the selected word is XORed with error_insert_in (all 20 bits
// inverted while it is high) and registered onto pattern_out.
//
// Pre-enable logic: in the first clock after reset_in falls every block is
// stepped once, so the first word of each sequence is ready before enable_in
// is ever raised. After that only the selected block advances, one word per
// clock while enable_in is high. The exact form of the pre-enable logic is this
// design's reading of a block the source only names.
//
// PATTERN_ENABLE bit i set builds block i; a cleared bit leaves the block
// out and its select value returns zeros (the source's build-time option for a
// smaller design).
//
// Timing: pattern_out is two clocks behind an enable (block register, then
// output register); error_insert_in is one clock ahead of the inverted word.
module pattern_gen
  import bert_pkg::*;
#(
  parameter logic [DATA_W-1:0] USER_PATTERN   = DEFAULT_USER_PATTERN,
  parameter logic [15:0]       PATTERN_ENABLE = 16'hFFFF
) (
  input  logic              clock_in,
  input  logic              reset_in,        // synchronous, active high
  input  logic              enable_in,       // advance the selected pattern
  input  logic              error_insert_in, // invert the next output word
  input  pattern_e          pattern_select_in,
  output logic [DATA_W-1:0] pattern_out
);

  logic              pre_enable;   // first clock after reset
  logic [15:0]       block_en;
  logic [DATA_W-1:0] block_out [16];

  always_ff @(posedge clock_in) pre_enable <= reset_in;

  always_comb begin
    for (int i = 0; i < 16; i++)
      block_en[i] = pre_enable || (enable_in && (pattern_select_in == pattern_e'(i)));
  end

  // PRBS blocks: {id, LFSR length, polynomial taps, inverted, zero suppression}
  localparam int          PRBS_ID  [10] = '{3, 4, 5, 6, 7, 8, 9, 10, 11, 12};
  localparam int          PRBS_LEN [10] = '{7, 9, 11, 15, 20, 20, 23, 29, 31, 32};
  localparam logic [31:0] PRBS_POLY[10] = '{
    (32'd1 << 6)  | (32'd1 << 5),                    // x^7  + x^6
    (32'd1 << 8)  | (32'd1 << 4),                    // x^9  + x^5
    (32'd1 << 10) | (32'd1 << 8),                    // x^11 + x^9
    (32'd1 << 14) | (32'd1 << 13),                   // x^15 + x^14
    (32'd1 << 19) | (32'd1 << 2),                    // x^20 + x^3
    (32'd1 << 19) | (32'd1 << 16),                   // x^20 + x^17
    (32'd1 << 22) | (32'd1 << 17),                   // x^23 + x^18
    (32'd1 << 28) | (32'd1 << 26),                   // x^29 + x^27
    (32'd1 << 30) | (32'd1 << 27),                   // x^31 + x^28
    (32'd1 << 31) | (32'd1 << 30) | (32'd1 << 29) | (32'd1 << 9) // x^32+x^31+x^30+x^10
  };
  localparam bit          PRBS_INV [10] = '{0, 0, 0, 1, 0, 0, 1, 1, 1, 0};
  localparam int          PRBS_ZS  [10] = '{0, 0, 0, 0, 0, 14, 0, 0, 0, 0};

  for (genvar g = 0; g < 10; g++) begin : g_prbs
    if (PATTERN_ENABLE[PRBS_ID[g]]) begin : g_on
      prbs_gen #(
        .N(DATA_W), .LENGTH(PRBS_LEN[g]), .INVERT(PRBS_INV[g]),
        .POLY(PRBS_POLY[g]), .ZERO_SUPPRESS(PRBS_ZS[g])
      ) u_prbs (
        .clock_in (clock_in),
        .reset_in (reset_in),
        .enable_in(block_en[PRBS_ID[g]]),
        .data_out (block_out[PRBS_ID[g]])
      );
    end else begin : g_off
      assign block_out[PRBS_ID[g]] = '0;
    end
  end

  // Constant-word blocks
  assign block_out[PAT_CLK2]  = PATTERN_ENABLE[PAT_CLK2]  ? CLK2_WORD    : '0;
  assign block_out[PAT_CLK10] = PATTERN_ENABLE[PAT_CLK10] ? CLK10_WORD   : '0;
  assign block_out[PAT_CLK20] = PATTERN_ENABLE[PAT_CLK20] ? CLK20_WORD   : '0;
  assign block_out[PAT_USER]  = PATTERN_ENABLE[PAT_USER]  ? USER_PATTERN : '0;
  assign block_out[PAT_CLK4]  = PATTERN_ENABLE[PAT_CLK4]  ? CLK4_WORD    : '0;

  // Counter block
  if (PATTERN_ENABLE[PAT_COUNTER]) begin : g_counter
    logic [DATA_W-1:0] count;
    always_ff @(posedge clock_in) begin
      if (reset_in)                  count <= '0;
      else if (block_en[PAT_COUNTER]) count <= count + 1'b1;
    end
    assign block_out[PAT_COUNTER] = count;
  end else begin : g_no_counter
    assign block_out[PAT_COUNTER] = '0;
  end

  always_ff @(posedge clock_in) begin
    if (reset_in) pattern_out <= '0;
    else          pattern_out <= block_out[pattern_select_in] ^ {DATA_W{error_insert_in}};
  end

endmodule
