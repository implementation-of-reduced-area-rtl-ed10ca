// tb_img_enhance_top: end-to-end test of the image enhancer at its default
// frame size (768 x 512).
//
// Loads a generated image (gradient with a border of black and white
// pixels), runs one frame of each operation, reloads a random image and runs
// further frames, and checks every output pixel pair, its row/column tag,
// out_last, done, the 3-clock start-to-first-pair latency and the
// W*H/2-clock frame time. It also counts each mechanism of the design and
// fails if one never happened: brightness saturation at 255, clamping at 0,
// inversion, both threshold outcomes, an operation switch between frames,
// a start request ignored while busy, and a frame reload.
module tb_img_enhance_top;
  import img_pkg::*;
  import img_ref_pkg::*;

  localparam int W = 768, H = 512, N = W * H, NP = N / 2;
  localparam int AW = $clog2(N), CW = $clog2(W), RW = $clog2(H);

  logic  clk, rst_n = 0;
  logic          ld_en = 0, start = 0;
  logic [AW-1:0] ld_addr = '0;
  rgb_t          ld_pix = '0;
  op_t           op = OP_BRIGHT_ADD;
  pix8_t         value = '0, thr = '0;
  logic          busy, done, out_valid, out_last;
  rgb_pair_t     out_pair;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;

  img_enhance_top dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_pix, .start, .op, .value, .thr,
    .busy, .done, .out_valid, .out_pair, .out_row, .out_col, .out_last
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  rgb_t img[N];
  int   checks = 0, failures = 0;
  int   n_sat = 0, n_clamp = 0, n_inv = 0, n_white = 0, n_black = 0;
  int   n_switch = 0, n_ignored = 0, n_reload = 0, n_frames = 0;
  bit   have_prev = 0;
  op_t  prev_op;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic load_image(bit random_img);
    for (int i = 0; i < N; i++) begin
      int r = i / W, c = i % W;
      if (random_img)             img[i] = rand_px();
      else if (r == 0)            img[i] = '1;   // white top row
      else if (r == H - 1)        img[i] = '0;   // black bottom row
      else                        img[i] = pattern_px(r, c, 0);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(i); ld_pix = img[i];
    end
    @(negedge clk);
    ld_en = 0;
    n_reload++;
  endtask

  // one complete frame; poke = also request a different operation mid-frame
  task automatic run_frame(op_t f_op, int f_value, int f_thr, bit poke);
    int lat = 0, pairs = 0, cyc = 0;
    bit got_done = 0;
    @(negedge clk);
    start = 1; op = f_op; value = 8'(f_value); thr = 8'(f_thr);
    @(negedge clk);
    start = 0; op = op_t'(f_op + 1); value = 8'(f_value + 7); thr = 8'(f_thr + 7);
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
      if (lat > 10) break;
    end
    checks++;
    if (lat != 3) fail($sformatf("start-to-first-pair latency %0d, exp 3", lat));
    while (out_valid && pairs < NP) begin
      int idx = 2 * pairs;
      rgb_t e0 = ref_op(f_op, f_value, f_thr, img[idx]);
      rgb_t e1 = ref_op(f_op, f_value, f_thr, img[idx + 1]);
      checks++;
      if (out_pair.p0 !== e0 || out_pair.p1 !== e1)
        fail($sformatf("op %s pair %0d got %h exp %h %h", f_op.name(), pairs, out_pair, e1, e0));
      checks++;
      if (int'(out_row) != idx / W || int'(out_col) != idx % W)
        fail($sformatf("tag r%0d c%0d at pair %0d", out_row, out_col, pairs));
      checks++;
      if (out_last != (pairs == NP - 1)) fail($sformatf("out_last=%0d at pair %0d", out_last, pairs));
      for (int k = 0; k < 2; k++) begin
        rgb_t s = img[idx + k];
        case (f_op)
          OP_BRIGHT_ADD: if (int'(s.r) + f_value > 255 || int'(s.g) + f_value > 255 || int'(s.b) + f_value > 255) n_sat++;
          OP_BRIGHT_SUB: if (int'(s.r) < f_value || int'(s.g) < f_value || int'(s.b) < f_value) n_clamp++;
          OP_INVERT:     n_inv++;
          OP_THRESHOLD:  if (ref_gray(s) > f_thr) n_white++; else n_black++;
          default: ;
        endcase
      end
      if (poke && pairs == 10) begin
        start = 1;
        if (busy) n_ignored++;
      end
      @(negedge clk);
      start = 0;
      cyc++;
      pairs++;
      if (done) got_done = 1;
    end
    checks++;
    if (cyc != NP) fail($sformatf("frame took %0d clocks, exp %0d", cyc, NP));
    if (!got_done) begin
      @(negedge clk);
      got_done = done;
    end
    checks++;
    if (!got_done) fail("done never pulsed");
    repeat (2) @(negedge clk);
    checks++;
    if (busy || out_valid) fail("design did not return to idle");
    if (have_prev && prev_op != f_op) n_switch++;
    prev_op = f_op;
    have_prev = 1;
    n_frames++;
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_image(1'b0);
    run_frame(OP_BRIGHT_ADD, 100, 0, 1'b0);
    run_frame(OP_BRIGHT_SUB, 100, 0, 1'b1);
    run_frame(OP_INVERT, 0, 0, 1'b0);
    run_frame(OP_THRESHOLD, 0, 128, 1'b0);
    load_image(1'b1);
    run_frame(OP_THRESHOLD, 0, 90, 1'b1);
    run_frame(OP_BRIGHT_ADD, 37, 0, 1'b0);
    $display("mechanism counts:");
    need(n_sat, "brightness saturate at 255");
    need(n_clamp, "brightness clamp at 0");
    need(n_inv, "inverted pixels");
    need(n_white, "threshold to white");
    need(n_black, "threshold to black");
    need(n_switch, "operation switch");
    need(n_ignored, "start ignored while busy");
    need(n_reload - 1, "frame reload");
    $display("frames %0d", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * N + 8 * NP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
