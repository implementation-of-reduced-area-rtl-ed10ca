// point_op_unit: one pixel lane of the enhancer.
//
// Applies the point operation chosen by `op` to one RGB pixel. The grey
// average is computed once and shared by the invert and threshold paths, and
// all four results feed a single multiplexer, so one lane holds one adder/
// clamp per channel, one averager, one comparator and one register stage.
// Each output pixel depends only on the input pixel at the same position.
//
// Interface: in_valid/pix enter with op, value (brightness constant) and thr
// (threshold); out_valid/out follow exactly one clock later. The register is
// cleared by the active-low synchronous reset. The operations are those of
// the source; the single shared averager, the run-time operation select and
// the one-cycle registered output are this design's choices.
module point_op_unit
  import img_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  op_t   op,
  input  pix8_t value,
  input  pix8_t thr,
  input  rgb_t  pix,
  output logic  out_valid,
  output rgb_t  out
);

  pix8_t gray;
  rgb_t  bright_px, inv_px, thr_px, res;

  gray_avg      u_avg (.pix(pix), .avg(gray));
  brightness_op u_bri (.pix(pix), .value(value), .sub(op == OP_BRIGHT_SUB), .out(bright_px));
  invert_op     u_inv (.gray(gray), .out(inv_px));
  threshold_op  u_thr (.gray(gray), .thr(thr), .out(thr_px));

  always_comb begin
    unique case (op)
      OP_BRIGHT_ADD, OP_BRIGHT_SUB: res = bright_px;
      OP_INVERT:                    res = inv_px;
      OP_THRESHOLD:                 res = thr_px;
      default:                      res = pix;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= res;
    end
  end

endmodule
