// img_ref_pkg: reference model of the point operations for the testbenches.
//
// Written with plain integer arithmetic and explicit clamping, independently
// of the RTL's bit-width tricks, so a testbench can compare each RTL output
// pixel with the value the operation should give.
package img_ref_pkg;
  import img_pkg::*;

  function automatic int ref_gray(rgb_t p);
    return (int'(p.r) + int'(p.g) + int'(p.b)) / 3;
  endfunction

  function automatic int clamp255(int v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  function automatic rgb_t grey_px(int v);
    rgb_t o;
    o.r = 8'(v);
    o.g = 8'(v);
    o.b = 8'(v);
    return o;
  endfunction

  function automatic rgb_t ref_op(op_t op, int value, int thr, rgb_t p);
    rgb_t o;
    case (op)
      OP_BRIGHT_ADD: begin
        o.r = 8'(clamp255(int'(p.r) + value));
        o.g = 8'(clamp255(int'(p.g) + value));
        o.b = 8'(clamp255(int'(p.b) + value));
      end
      OP_BRIGHT_SUB: begin
        o.r = 8'(clamp255(int'(p.r) - value));
        o.g = 8'(clamp255(int'(p.g) - value));
        o.b = 8'(clamp255(int'(p.b) - value));
      end
      OP_INVERT:    o = grey_px(255 - ref_gray(p));
      OP_THRESHOLD: o = grey_px(ref_gray(p) > thr ? 255 : 0);
      default:      o = p;
    endcase
    return o;
  endfunction

  function automatic rgb_t rand_px();
    rgb_t o;
    o.r = 8'($urandom);
    o.g = 8'($urandom);
    o.b = 8'($urandom);
    return o;
  endfunction

  // Deterministic test image: a diagonal gradient with a per-channel twist,
  // so neighbouring pixels differ and every channel covers 0..255.
  function automatic rgb_t pattern_px(int row, int col, int seed);
    rgb_t o;
    o.r = 8'(row * 3 + col + seed);
    o.g = 8'(col * 5 - row + seed * 7);
    o.b = 8'((row ^ col) * 11 + seed * 13);
    return o;
  endfunction

endpackage
