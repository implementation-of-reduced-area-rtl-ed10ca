// tb_invert_op: checks 255 - grey on all three channels for every grey level.
module tb_invert_op;
  import img_pkg::*;
  import img_ref_pkg::*;

  pix8_t gray;
  rgb_t  out;
  int    checks = 0, failures = 0;

  invert_op dut (.gray, .out);

  initial begin
    for (int g = 0; g < 256; g++) begin
      gray = 8'(g);
      #1;
      checks++;
      if (out !== grey_px(255 - g)) begin
        failures++;
        $display("FAIL gray=%0d out=%h", g, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
