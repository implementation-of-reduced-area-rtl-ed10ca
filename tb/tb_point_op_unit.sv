// tb_point_op_unit: drives a random stream of pixels, operations and
// constants (with gaps in in_valid) into one lane and checks that each result
// appears exactly one clock later with out_valid, matching the reference.
module tb_point_op_unit;
  import img_pkg::*;
  import img_ref_pkg::*;

  logic  clk, rst_n = 0, in_valid = 0, out_valid;
  op_t   op = OP_BRIGHT_ADD;
  pix8_t value = 0, thr = 0;
  rgb_t  pix = '0, out;
  int    checks = 0, failures = 0;
  int    op_seen[4] = '{0, 0, 0, 0};

  logic  exp_valid = 0;
  rgb_t  exp_px;

  point_op_unit dut (.clk, .rst_n, .in_valid, .op, .value, .thr, .pix, .out_valid, .out);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // outputs now hold what the last rising edge captured
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL cycle %0d out_valid=%0d exp=%0d", i, out_valid, exp_valid);
      end else if (exp_valid && out !== exp_px) begin
        failures++;
        $display("FAIL cycle %0d out=%h exp=%h", i, out, exp_px);
      end
      // new stimulus, captured at the next rising edge
      in_valid = ($urandom % 4) != 0;
      op       = op_t'($urandom % 4);
      value    = 8'($urandom);
      thr      = 8'($urandom);
      pix      = rand_px();
      exp_valid = in_valid;
      if (in_valid) begin
        exp_px = ref_op(op, int'(value), int'(thr), pix);
        op_seen[op]++;
      end
    end
    foreach (op_seen[k]) begin
      checks++;
      if (op_seen[k] == 0) begin
        failures++;
        $display("FAIL op %0d never used", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
