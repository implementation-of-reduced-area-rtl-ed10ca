// gray_avg: grey level of an RGB pixel, the integer average (R + G + B) / 3.
//
// The three 8-bit components are summed in 10 bits (at most 765) and divided
// by the constant 3, rounding down, so the result always fits in 8 bits.
// Inversion and thresholding both work on this equalised grey value. The
// average itself follows the source description; rounding toward zero is the
// plain integer division it implies.
//
// Purely combinational: avg is valid in the same cycle as pix.
module gray_avg
  import img_pkg::*;
(
  input  rgb_t  pix,
  output pix8_t avg
);

  logic [9:0] sum;

  always_comb begin
    sum = 10'(pix.r) + 10'(pix.g) + 10'(pix.b);
    avg = pix8_t'(sum / 10'd3);
  end

endmodule
