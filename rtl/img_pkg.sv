// img_pkg: types and constants shared by the point-operation image enhancer.
//
// A pixel is three 8-bit colour components (R, G, B). The datapath handles
// two horizontally adjacent pixels per clock (columns col and col+1), so a
// pixel pair type is defined too; p0 is the even column, p1 the odd one.
// The operation code selects one of the point operations the design offers:
// brightness increase, brightness decrease, inversion and thresholding. The
// two-bit encoding is this design's own choice.
package img_pkg;

  typedef logic [7:0] pix8_t;

  localparam pix8_t PIX_MAX = 8'd255;
  localparam pix8_t PIX_MIN = 8'd0;

  typedef struct packed {
    pix8_t r;
    pix8_t g;
    pix8_t b;
  } rgb_t;

  typedef struct packed {
    rgb_t p1;  // column col+1 (odd)
    rgb_t p0;  // column col   (even)
  } rgb_pair_t;

  typedef enum logic [1:0] {
    OP_BRIGHT_ADD = 2'd0,
    OP_BRIGHT_SUB = 2'd1,
    OP_INVERT     = 2'd2,
    OP_THRESHOLD  = 2'd3
  } op_t;

endpackage
