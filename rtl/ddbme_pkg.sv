// ddbme_pkg: constants and types shared by the data-dispatch binary motion
// estimator (DDBME).
//
// A binary alpha block (BAB) is 16x16 one-bit pixels; one row of it is packed
// into a 16-bit word with the leftmost pixel in bit 15. The search range is
// [-16,15] in both directions around the motion vector predictor, i.e. 32x32
// candidate positions. Sixteen processing elements work on sixteen
// horizontally adjacent candidates; a search-range word is 32 pixels wide.
// These numbers follow the published architecture. The widths of motion
// vectors and frame coordinates are this design's own choice.
package ddbme_pkg;

  localparam int unsigned BLK     = 16;            // BAB size, pixels per entry, PEs
  localparam int unsigned NPE     = BLK;           // number of processing elements
  localparam int unsigned SRW     = 2 * BLK;       // search-range word width (bits)
  localparam int unsigned NPOS    = 2 * BLK;       // candidate positions per axis (-16..15)
  localparam int unsigned CNT_W   = 5;             // ones in a 16-bit row: 0..16
  localparam int unsigned SAD_W   = 9;             // SAD of a 16x16 BAB: 0..256
  localparam int unsigned MV_W    = 10;            // signed MV component width
  localparam int unsigned COORD_W = 12;            // signed pixel coordinate width
  localparam int unsigned ROW_W   = 10;            // frame row index (up to 1023)
  localparam int unsigned COL_W   = 6;             // frame word column (up to 63 words)

  typedef logic [BLK-1:0]   row_t;                 // one packed BAB row
  typedef logic [SRW-1:0]   srword_t;              // one packed search-range row
  typedef logic [SAD_W-1:0] sad_t;

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Tag that travels with a finished set of 16 SADs from the PE array to CAS.
  typedef struct packed {
    logic       pre;      // predictor check position (only PE0's SAD is used)
    logic       strip;    // 0: candidates i = 0..15, 1: i = 16..31
    logic [4:0] j;        // vertical candidate index 0..31
    logic       last;     // last position of the search
  } postag_t;

endpackage
