// prc_pkg: types and constants shared by the point cloud rendering engine.
//
// A point element reaches the engine as a 64-bit code word. Its field layout
// (MODE bit 0, SCANS bits 1..24, DIFFUSE 25..31, SPECULAR 32..38, MATERIAL
// 39..45, X 46..54, Z 55..63) follows the published code word format. The
// packed struct code_t lists the fields from the most significant end, so
// code_t'(word) places every field at those bit positions.
//
// The 24 SCANS bits hold four scans of six bits. Scan r (r = 0..3, top row
// first) sits at bits [1+6r +: 6] of the word: the low three bits are the start
// of the scan (SoS, pixel offset inside the 8-pixel wide bitmap) and the high
// three bits its length (LoS, 0 = empty row). The order of SoS and LoS inside a
// scan and the row order are this design's choice.
//
// Frame and Z buffer memory holds four horizontally adjacent pixels per word;
// a pixel is a 24-bit RGB colour with a 9-bit depth. Smaller Z is nearer.
package prc_pkg;

  localparam int CODE_W     = 64;
  localparam int X_W        = 9;   // X field of the code word
  localparam int Z_W        = 9;   // Z field of the code word
  localparam int LIGHT_W    = 7;   // DIFFUSE, SPECULAR and MATERIAL fields
  localparam int SCAN_POS_W = 3;   // SoS
  localparam int SCAN_LEN_W = 3;   // LoS
  localparam int STORED_SCANS = 4; // scans carried by one code word
  localparam int ROWS       = 8;   // rows of the element bitmap
  localparam int PIX_PER_WORD = 4; // pixels per frame/Z buffer word
  localparam int MAT_N      = 1 << LIGHT_W; // entries of the kd and ks tables

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    rgb_t           rgb;
    logic [Z_W-1:0] z;
  } pixel_t;

  // One frame/Z buffer word: pixel 0 is the leftmost.
  typedef pixel_t [PIX_PER_WORD-1:0] pword_t;

  typedef struct packed {
    logic [Z_W-1:0]     z;         // bits 63..55
    logic [X_W-1:0]     x;         // bits 54..46
    logic [LIGHT_W-1:0] material;  // bits 45..39
    logic [LIGHT_W-1:0] specular;  // bits 38..32
    logic [LIGHT_W-1:0] diffuse;   // bits 31..25
    logic [STORED_SCANS*(SCAN_POS_W+SCAN_LEN_W)-1:0] scans; // bits 24..1
    logic               mode;      // bit 0: 0 small point, 1 large point fragment
  } code_t;

  // A row scan after decoding. The start offset is signed because the
  // mirrored scans of a small point may begin one column left of the bitmap.
  typedef struct packed {
    logic signed [3:0]     off; // first pixel, relative to the element X
    logic [SCAN_LEN_W-1:0] len; // number of pixels, 0 = nothing to draw
  } scan_t;

  typedef scan_t [ROWS-1:0] rows_t;

  // A decoded element: one scan per bitmap row, common position and colour.
  typedef struct packed {
    rows_t          rows;
    logic [X_W-1:0] x;
    logic [Z_W-1:0] z;
    rgb_t           rgb;
  } elem_t;

  // Commands of the particle stream. The y coordinate is not in the code
  // word: the host sends the elements of one window position, then CMD_LINE.
  typedef enum logic {
    CMD_ELEM = 1'b0,
    CMD_LINE = 1'b1
  } cmd_e;

  // Colour configuration address map (kd table, ks table, ambient I0).
  localparam int CFG_ADDR_W = 9;
  localparam logic [CFG_ADDR_W-1:0] CFG_KD_BASE = 9'd0;
  localparam logic [CFG_ADDR_W-1:0] CFG_KS_BASE = 9'd128;
  localparam logic [CFG_ADDR_W-1:0] CFG_I0      = 9'd256;

endpackage
