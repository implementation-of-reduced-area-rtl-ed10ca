// tb_gray_avg: checks the RGB average against integer division by 3, for the
// corner pixels (black, white, single full channels) and 20000 random pixels.
module tb_gray_avg;
  import img_pkg::*;
  import img_ref_pkg::*;

  rgb_t  pix;
  pix8_t avg;
  int    checks = 0, failures = 0;

  gray_avg dut (.pix, .avg);

  task automatic check(rgb_t p);
    pix = p;
    #1;
    checks++;
    if (int'(avg) != ref_gray(p)) begin
      failures++;
      $display("FAIL pix=%h avg=%0d exp=%0d", p, avg, ref_gray(p));
    end
  endtask

  initial begin
    check('0);
    check('1);
    check({8'd255, 8'd0, 8'd0});
    check({8'd0, 8'd255, 8'd0});
    check({8'd0, 8'd0, 8'd255});
    check({8'd255, 8'd255, 8'd254});
    check({8'd1, 8'd1, 8'd0});
    for (int i = 0; i < 20000; i++) check(rand_px());
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
