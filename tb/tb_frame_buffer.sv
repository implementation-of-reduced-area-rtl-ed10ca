// tb_frame_buffer: fills a small frame one pixel per clock in a shuffled
// order, then reads every pixel pair back and checks the even and odd
// pixels, the one-clock read latency and that rd_data holds when rd_en is
// low.
module tb_frame_buffer;
  import img_pkg::*;
  import img_ref_pkg::*;

  localparam int W = 8, H = 6, N = W * H, NP = N / 2;
  localparam int AW = $clog2(N), PAW = $clog2(NP);

  logic  clk, wr_en = 0, rd_en = 0;
  logic [AW-1:0]   wr_addr = '0;
  logic [PAW-1:0]  rd_addr = '0;
  rgb_t            wr_pix = '0;
  rgb_pair_t       rd_data;
  rgb_t            img[N];
  int              order[N];
  int              checks = 0, failures = 0;

  frame_buffer #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .wr_en, .wr_addr, .wr_pix, .rd_en, .rd_addr, .rd_data);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < N; i++) begin
      img[i] = rand_px();
      order[i] = i;
    end
    order.shuffle();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(order[i]); wr_pix = img[order[i]];
    end
    @(negedge clk);
    wr_en = 0;
    for (int p = 0; p < NP; p++) begin
      rd_en = 1; rd_addr = PAW'(p);
      @(negedge clk);
      checks++;
      if (rd_data.p0 !== img[2*p] || rd_data.p1 !== img[2*p+1]) begin
        failures++;
        $display("FAIL pair %0d got %h exp %h %h", p, rd_data, img[2*p+1], img[2*p]);
      end
    end
    // hold: rd_en low, address changes, data must stay at the last pair
    rd_en = 0; rd_addr = '0;
    @(negedge clk);
    checks++;
    if (rd_data.p0 !== img[N-2] || rd_data.p1 !== img[N-1]) begin
      failures++;
      $display("FAIL read data did not hold");
    end
    // overwrite one odd pixel and read its pair back
    wr_en = 1; wr_addr = AW'(5); wr_pix = 24'h123456;
    @(negedge clk);
    wr_en = 0; rd_en = 1; rd_addr = PAW'(2);
    @(negedge clk);
    checks++;
    if (rd_data.p1 !== 24'h123456 || rd_data.p0 !== img[4]) begin
      failures++;
      $display("FAIL overwrite: got %h", rd_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
