// bert_pkg: types and constants shared by the bit-error-rate tester (BERT).
//
// The tester moves 20-bit parallel frames ("words") between the FPGA fabric and
// a serializer/deserializer. The pattern numbering (pattern_e) and the control
// and status word layouts below follow the tester's register map; the counter
// widths follow the status register layout (41-bit frame counters, 25-bit
// error-frame counter, 32-bit bit-error counter). The 41-bit error-interval
// width is read from the same register layout.
package bert_pkg;

  localparam int unsigned DATA_W       = 20;  // frame width in bits
  localparam int unsigned FRAMES_W     = 41;  // total-frames counter
  localparam int unsigned ERR_FRAMES_W = 25;  // error-frames counter
  localparam int unsigned BIT_ERRORS_W = 32;  // bit-errors counter
  localparam int unsigned INTERVAL_W   = 41;  // error-interval counter
  localparam int unsigned BITCNT_W     = 5;   // bit errors in one frame, 0..20

  localparam logic [DATA_W-1:0] DEFAULT_COMMA        = 20'h3E8E1;
  localparam logic [DATA_W-1:0] DEFAULT_USER_PATTERN = 20'hC1554;

  // Pattern identifiers, as driven on pattern_select.
  typedef enum logic [3:0] {
    PAT_CLK2     = 4'd0,   // 1010...      : clock at 1/2 of the serial rate
    PAT_CLK10    = 4'd1,   // 5 ones 5 zeros
    PAT_CLK20    = 4'd2,   // 10 ones 10 zeros
    PAT_PRBS7    = 4'd3,   // x^7  + x^6  + 1
    PAT_PRBS9    = 4'd4,   // x^9  + x^5  + 1
    PAT_PRBS11   = 4'd5,   // x^11 + x^9  + 1
    PAT_PRBS15   = 4'd6,   // x^15 + x^14 + 1, inverted
    PAT_PRBS20   = 4'd7,   // x^20 + x^3  + 1
    PAT_PRBS20ZS = 4'd8,   // x^20 + x^17 + 1, at most 14 zeros in a row
    PAT_PRBS23   = 4'd9,   // x^23 + x^18 + 1, inverted
    PAT_PRBS29   = 4'd10,  // x^29 + x^27 + 1, inverted
    PAT_PRBS31   = 4'd11,  // x^31 + x^28 + 1, inverted
    PAT_PRBS32   = 4'd12,  // x^32 + x^31 + x^30 + x^10 + 1
    PAT_USER     = 4'd13,  // fixed user word
    PAT_CLK4     = 4'd14,  // 1100...
    PAT_COUNTER  = 4'd15   // 20-bit incrementing counter
  } pattern_e;

  // Constant words of the clock patterns (first bit sent is bit 19).
  localparam logic [DATA_W-1:0] CLK2_WORD  = 20'hAAAAA;
  localparam logic [DATA_W-1:0] CLK10_WORD = 20'hF83E0;
  localparam logic [DATA_W-1:0] CLK20_WORD = 20'hFFC00;
  localparam logic [DATA_W-1:0] CLK4_WORD  = 20'hCCCCC;

  // Per-channel control word: bits [8:0] of a control register write.
  typedef struct packed {
    logic       error_insert;   // [8]   toggling inserts one error frame
    logic       powerdown;      // [7]   transceiver power-down
    logic       tx_inhibit;     // [6]   serial transmitter off
    logic [1:0] loopback;       // [5:4] 00 none, 01 parallel, 10 serial
    pattern_e   pattern_select; // [3:0]
  } chan_ctrl_t;

  // Per-channel BER statistics, as seen by the register map.
  typedef struct packed {
    logic                    wait_s;     // waiting for the pattern (searching)
    logic                    lock;       // aligned to the incoming pattern
    logic                    abort_s;     // stopped after a burst of error frames
    logic                    overflow;   // bit-error counter wrapped
    logic [ERR_FRAMES_W-1:0] error_frames;
    logic [BIT_ERRORS_W-1:0] bit_errors;
    logic [FRAMES_W-1:0]     total_frames;
    logic [INTERVAL_W-1:0]   error_interval;
  } ber_status_t;

endpackage
