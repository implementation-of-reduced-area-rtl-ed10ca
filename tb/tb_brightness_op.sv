// tb_brightness_op: checks brightness increase and decrease, including
// saturation at 255 and clamping at 0, against an integer reference.
module tb_brightness_op;
  import img_pkg::*;
  import img_ref_pkg::*;

  rgb_t  pix, out;
  pix8_t value;
  logic  sub;
  int    checks = 0, failures = 0, n_sat = 0, n_clamp = 0;

  brightness_op dut (.pix, .value, .sub, .out);

  task automatic check(rgb_t p, pix8_t v, logic s);
    rgb_t e;
    pix = p; value = v; sub = s;
    #1;
    e = ref_op(s ? OP_BRIGHT_SUB : OP_BRIGHT_ADD, int'(v), 0, p);
    if (!s && int'(p.r) + int'(v) > 255) n_sat++;
    if (s && int'(p.r) < int'(v)) n_clamp++;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL pix=%h v=%0d sub=%0d out=%h exp=%h", p, v, s, out, e);
    end
  endtask

  initial begin
    check({8'd200, 8'd100, 8'd0}, 8'd100, 1'b0);
    check({8'd200, 8'd100, 8'd0}, 8'd100, 1'b1);
    check('1, 8'd1, 1'b0);
    check('0, 8'd1, 1'b1);
    check('1, 8'd255, 1'b1);
    check({8'd155, 8'd155, 8'd155}, 8'd100, 1'b0);
    check({8'd100, 8'd100, 8'd100}, 8'd100, 1'b1);
    for (int i = 0; i < 20000; i++) check(rand_px(), 8'($urandom), 1'($urandom));
    checks++;
    if (n_sat == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL saturation or clamping never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
