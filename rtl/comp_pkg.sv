// Shared constants of the Compositor.
//
// A pixel travels through a Compositor as six bytes on an 8-bit bus, in the
// order Z low, Z high, alpha, red, green, blue, one byte per clock. Z is a
// 16-bit unsigned depth (smaller is nearer). Alpha is 8 bits outside the chip
// (255 = 1.0) and 9 bits inside (256 = 1.0). The coverage estimate beta is a
// 5-bit fraction in sixteenths (16 = 1.0). These widths, the byte order and the
// six-clock pixel period follow the thesis; the output latency of ten clocks is
// the figure its pixel timing table gives from input Z low to output Z low.
package comp_pkg;

  localparam int unsigned BYTE_W        = 8;   // data bus width
  localparam int unsigned Z_W           = 16;  // depth width
  localparam int unsigned ALPHA_W       = 9;   // internal alpha, 1.0 = 256
  localparam int unsigned BETA_W        = 5;   // beta in sixteenths, 1.0 = 16
  localparam int unsigned PIXEL_CLOCKS  = 6;   // clocks per pixel
  localparam int unsigned PIXEL_LATENCY = 10;  // input Z low to output Z low
  localparam int unsigned IN_ADDR_W     = 16;  // IN_ADDR and OUT_ADDR width
  localparam int unsigned PREV_ADDR_W   = 14;  // PREV_ADDR width

  // Position of a byte within the six-byte pixel.
  typedef enum logic [2:0] {
    BYTE_Z_LO  = 3'd0,
    BYTE_Z_HI  = 3'd1,
    BYTE_ALPHA = 3'd2,
    BYTE_RED   = 3'd3,
    BYTE_GREEN = 3'd4,
    BYTE_BLUE  = 3'd5
  } pixel_byte_e;

  // One pixel in the external representation.
  typedef struct packed {
    logic [Z_W-1:0]    z;
    logic [BYTE_W-1:0] alpha;
    logic [BYTE_W-1:0] red;
    logic [BYTE_W-1:0] green;
    logic [BYTE_W-1:0] blue;
  } pixel_t;

endpackage
