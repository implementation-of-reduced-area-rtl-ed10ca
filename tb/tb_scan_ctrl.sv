// tb_scan_ctrl: runs two frames of a small raster and checks every issued
// read (address, row, column, last flag), that a frame takes exactly
// W*H/2 clocks, that done pulses once per frame and that a start pulse
// during a scan is ignored.
module tb_scan_ctrl;
  localparam int W = 10, H = 4, NP = W * H / 2;
  localparam int PAW = $clog2(NP), CW = $clog2(W), RW = $clog2(H);

  logic  clk, rst_n = 0, start = 0;
  logic           busy, done, rd_en, rd_last;
  logic [PAW-1:0] rd_addr;
  logic [RW-1:0]  rd_row;
  logic [CW-1:0]  rd_col;
  int             checks = 0, failures = 0;

  scan_ctrl #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .rst_n, .start, .busy, .done, .rd_en, .rd_addr, .rd_row, .rd_col, .rd_last);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run_frame(bit poke_start);
    int n = 0, dones = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (rd_en) begin
      chk(int'(rd_addr) == n, $sformatf("addr %0d exp %0d", rd_addr, n));
      chk(int'(rd_row) == n / (W / 2) && int'(rd_col) == 2 * (n % (W / 2)),
          $sformatf("pos r%0d c%0d at pair %0d", rd_row, rd_col, n));
      chk(rd_last == (n == NP - 1), $sformatf("last=%0d at pair %0d", rd_last, n));
      chk(busy, "busy low during scan");
      if (poke_start && n == 3) start = 1;
      @(negedge clk);
      start = 0;
      if (done) dones++;
      n++;
    end
    chk(n == NP, $sformatf("frame took %0d clocks, exp %0d", n, NP));
    repeat (3) begin
      @(negedge clk);
      if (done) dones++;
      chk(!rd_en && !busy, "controller restarted by itself");
    end
    chk(dones == 1, $sformatf("done pulsed %0d times", dones));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_frame(1'b0);
    run_frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
