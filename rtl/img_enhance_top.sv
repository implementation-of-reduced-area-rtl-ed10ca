// img_enhance_top: point-operation image enhancer.
//
// A frame of RGB pixels is loaded into the frame buffer, one pixel per clock
// in raster order. A start pulse then latches the operation (brightness
// increase or decrease by `value`, grey inversion, or threshold at `thr`) and
// the scan controller reads the frame back two pixels per clock. Each pixel
// of the pair goes through its own point-operation lane, and the processed
// pair leaves on out_pair with its row and column, so a frame of W x H pixels
// is produced in W*H/2 clocks.
//
// Timing: the first pair leaves 3 clocks after start is seen (1 clock to
// enter the scan state, 1 for the buffer read, 1 for the lane register),
// then one pair per clock with out_valid high, out_last on the final pair
// and `done` one clock after it. The sink is assumed always ready. op, value
// and thr are sampled at start, so changing them mid-frame affects the next
// frame only; start is ignored until the
// previous frame has left the pipeline (busy low). The frame buffer must not be loaded while busy.
//
// The operations, the two-pixels-per-clock datapath and the raster memory
// follow the source. The run-time operation select (the source chooses the
// operation when the design is built), the load port, the handshake and the
// pipeline registers are this design's choices.
module img_enhance_top
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 768,
  parameter int unsigned HEIGHT = 512,
  localparam int unsigned NPIX  = WIDTH * HEIGHT,
  localparam int unsigned AW    = $clog2(NPIX),
  localparam int unsigned PAW   = $clog2(NPIX / 2),
  localparam int unsigned CW    = $clog2(WIDTH),
  localparam int unsigned RW    = $clog2(HEIGHT)
) (
  input  logic          clk,
  input  logic          rst_n,
  // frame load
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  rgb_t          ld_pix,
  // operation control
  input  logic          start,
  input  op_t           op,
  input  pix8_t         value,
  input  pix8_t         thr,
  output logic          busy,
  output logic          done,
  // processed pixel pairs
  output logic          out_valid,
  output rgb_pair_t     out_pair,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output logic          out_last
);

  // ---- configuration latched at start ----
  op_t   cfg_op;
  pix8_t cfg_value, cfg_thr;
  logic  scan_busy, go;

  // a new frame starts only once the previous one has fully drained
  assign go = start && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_op    <= OP_BRIGHT_ADD;
      cfg_value <= '0;
      cfg_thr   <= '0;
    end else if (go) begin
      cfg_op    <= op;
      cfg_value <= value;
      cfg_thr   <= thr;
    end
  end

  // ---- scan ----
  logic           rd_en, rd_last;
  logic [PAW-1:0] rd_addr;
  logic [RW-1:0]  rd_row;
  logic [CW-1:0]  rd_col;

  scan_ctrl #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_scan (
    .clk, .rst_n, .start(go),
    .busy(scan_busy), .done(),
    .rd_en, .rd_addr, .rd_row, .rd_col, .rd_last
  );

  // ---- frame memory ----
  rgb_pair_t rd_data;

  frame_buffer #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_fb (
    .clk,
    .wr_en(ld_en), .wr_addr(ld_addr), .wr_pix(ld_pix),
    .rd_en, .rd_addr, .rd_data
  );

  // ---- tags aligned with the buffer read (stage 1) ----
  logic          s1_valid, s1_last;
  logic [RW-1:0] s1_row;
  logic [CW-1:0] s1_col;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_row   <= '0;
      s1_col   <= '0;
    end else begin
      s1_valid <= rd_en;
      s1_last  <= rd_last;
      s1_row   <= rd_row;
      s1_col   <= rd_col;
    end
  end

  // ---- two point-operation lanes (stage 2) ----
  logic v0, v1;

  point_op_unit u_lane0 (
    .clk, .rst_n, .in_valid(s1_valid), .op(cfg_op), .value(cfg_value),
    .thr(cfg_thr), .pix(rd_data.p0), .out_valid(v0), .out(out_pair.p0)
  );

  point_op_unit u_lane1 (
    .clk, .rst_n, .in_valid(s1_valid), .op(cfg_op), .value(cfg_value),
    .thr(cfg_thr), .pix(rd_data.p1), .out_valid(v1), .out(out_pair.p1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_last <= 1'b0;
      out_row  <= '0;
      out_col  <= '0;
      done     <= 1'b0;
    end else begin
      out_last <= s1_last;
      out_row  <= s1_row;
      out_col  <= s1_col;
      done     <= out_last;
    end
  end

  assign out_valid = v0;
  assign busy      = scan_busy || s1_valid || out_valid;

  // lanes run in lock step
  a_lanes_lockstep: assert property (@(posedge clk) disable iff (!rst_n) v0 == v1);
  // no frame load while a frame is being processed
  a_no_load_busy: assert property (@(posedge clk) disable iff (!rst_n) !(ld_en && scan_busy));

endmodule
