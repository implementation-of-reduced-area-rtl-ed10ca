// threshold_op: two-level (black/white) pixel.
//
// Compares the grey level of a pixel (the RGB average from gray_avg) with a
// threshold. Above the threshold the pixel becomes white (255 on every
// channel), otherwise black (0). Mapping to the two values 255 and 0 follows
// the source description; comparing the RGB average, and sending a value
// equal to the threshold to black, are this design's choices.
//
// Purely combinational.
module threshold_op
  import img_pkg::*;
(
  input  pix8_t gray,
  input  pix8_t thr,
  output rgb_t  out
);

  pix8_t lvl;

  always_comb begin
    lvl   = (gray > thr) ? PIX_MAX : PIX_MIN;
    out.r = lvl;
    out.g = lvl;
    out.b = lvl;
  end

endmodule
