// brightness_op: brightness change of one RGB pixel.
//
// Adds a constant to each colour component (sub = 0) or subtracts it
// (sub = 1). Each channel is computed with one extra bit so that a sum above
// 255 saturates at 255 and a difference below zero clamps to 0, keeping every
// result a valid 8-bit intensity. Adding/subtracting a constant and clamping
// a negative difference to zero follow the source description; the
// saturation at 255 on the add side is this design's completion of it.
//
// Purely combinational.
module brightness_op
  import img_pkg::*;
(
  input  rgb_t  pix,
  input  pix8_t value,
  input  logic  sub,
  output rgb_t  out
);

  function automatic pix8_t adjust(pix8_t a, pix8_t v, logic dec);
    logic [8:0] t;
    if (dec) begin
      t = {1'b0, a} - {1'b0, v};
      return t[8] ? PIX_MIN : t[7:0];  // borrow: result went negative
    end else begin
      t = {1'b0, a} + {1'b0, v};
      return t[8] ? PIX_MAX : t[7:0];  // carry: result above 255
    end
  endfunction

  always_comb begin
    out.r = adjust(pix.r, value, sub);
    out.g = adjust(pix.g, value, sub);
    out.b = adjust(pix.b, value, sub);
  end

endmodule
