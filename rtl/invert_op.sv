// invert_op: inverted grey pixel.
//
// Takes the grey level of a pixel (the RGB average from gray_avg) and
// reverses the intensity scale, 255 - grey, driving that value on all three
// channels so the output is a grey negative. Both the averaging and the
// 255 - x mapping follow the source description.
//
// Purely combinational.
module invert_op
  import img_pkg::*;
(
  input  pix8_t gray,
  output rgb_t  out
);

  pix8_t inv;

  always_comb begin
    inv   = PIX_MAX - gray;
    out.r = inv;
    out.g = inv;
    out.b = inv;
  end

endmodule
