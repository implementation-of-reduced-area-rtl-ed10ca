// tb_threshold_op: checks the black/white decision for every grey level
// against a set of thresholds, including equality and the 0/255 extremes.
module tb_threshold_op;
  import img_pkg::*;
  import img_ref_pkg::*;

  pix8_t gray, thr;
  rgb_t  out;
  int    checks = 0, failures = 0;
  int    thrs[6] = '{0, 1, 90, 128, 254, 255};

  threshold_op dut (.gray, .thr, .out);

  initial begin
    foreach (thrs[t]) begin
      for (int g = 0; g < 256; g++) begin
        gray = 8'(g);
        thr  = 8'(thrs[t]);
        #1;
        checks++;
        if (out !== grey_px(g > thrs[t] ? 255 : 0)) begin
          failures++;
          $display("FAIL gray=%0d thr=%0d out=%h", g, thrs[t], out);
        end
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
