// moment_pkg: number format and shared constants of the image-moment engine.
//
// Moments are carried in an unsigned 18-bit floating-point format: an 8-bit
// exponent E and a 10-bit normalised mantissa M whose leading one is stored
// explicitly. The value is M * 2^(E-9), so E = 0 with M = 512 is 1.0, every
// integer up to 1024 is exact, and the largest value is 1023 * 2^246
// (about 1.16e77). M = 0 encodes zero. There is no sign bit, since moments of
// an image with nonnegative pixels and positive coordinates are never
// negative. The 8/10 split and the absence of a sign follow the document; the
// explicit leading one, the exponent offset and truncating arithmetic are this
// design's reading of it.
package moment_pkg;

  localparam int unsigned EXP_W   = 8;   // exponent bits
  localparam int unsigned MAN_W   = 10;  // mantissa bits, leading one included
  localparam int unsigned POW_W   = 3;   // p and q select 0..7
  localparam int unsigned MPE_LAT = 5;   // cycles from MPE input to its sum
  localparam int unsigned COORD_W = 11;  // coordinates 1..1024 (up to 2047)
  localparam int unsigned PIX_W   = 8;   // grayscale pixel

  typedef struct packed {
    logic [EXP_W-1:0] e;
    logic [MAN_W-1:0] m;
  } fp_t;

  localparam fp_t FP_ZERO = '{e: '0, m: '0};
  localparam fp_t FP_ONE  = '{e: '0, m: 10'h200};
  localparam fp_t FP_MAX  = '{e: '1, m: '1};

  // Operands of one moment processor element for one pixel.
  typedef struct packed {
    logic [COORD_W-1:0] x;    // row, 1-based
    logic [COORD_W-1:0] y;    // column, 1-based
    logic [POW_W-1:0]   p;    // power of x
    logic [POW_W-1:0]   q;    // power of y
    logic [PIX_W-1:0]   pix;  // f(x,y); 0 in an empty slot
  } cell_in_t;

endpackage
