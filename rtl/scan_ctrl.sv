// scan_ctrl: raster scan controller for one frame.
//
// On a start pulse it walks the frame row by row, left to right, two
// columns at a time: each clock it issues one read of the pixel pair at
// (row, col) and (row, col+1), using pair address (WIDTH*row + col) / 2.
// A frame therefore takes WIDTH*HEIGHT/2 consecutive clocks. The issue is
// tagged with its row and column and with `last` on the final pair; after
// it the controller returns to idle and pulses `done` once.
//
// Interface: start is sampled only in IDLE (ignored while busy). rd_en,
// rd_addr, rd_row, rd_col and rd_last all describe the same issue cycle;
// whatever reads the frame buffer adds its own latency. Synchronous,
// active-low reset. The row/col walk with col and col+1 in the same step
// follows the source; the start/busy/done handshake and the two-state FSM
// are this design's choices.
module scan_ctrl #(
  parameter int unsigned WIDTH  = 768,
  parameter int unsigned HEIGHT = 512,
  localparam int unsigned NPAIR = WIDTH * HEIGHT / 2,
  localparam int unsigned PAW   = $clog2(NPAIR),
  localparam int unsigned CW    = $clog2(WIDTH),
  localparam int unsigned RW    = $clog2(HEIGHT)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           rd_en,
  output logic [PAW-1:0] rd_addr,
  output logic [RW-1:0]  rd_row,
  output logic [CW-1:0]  rd_col,
  output logic           rd_last
);

  typedef enum logic {S_IDLE, S_SCAN} state_t;

  state_t         state;
  logic [RW-1:0]  row;
  logic [CW-1:0]  col;
  logic [PAW-1:0] addr;
  logic           end_of_row, end_of_frame;

  assign end_of_row   = (col == CW'(WIDTH - 2));
  assign end_of_frame = end_of_row && (row == RW'(HEIGHT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      col   <= '0;
      addr  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          row  <= '0;
          col  <= '0;
          addr <= '0;
          if (start) state <= S_SCAN;
        end
        S_SCAN: begin
          addr <= addr + 1'b1;
          if (end_of_frame) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (end_of_row) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + CW'(2);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state == S_SCAN);
  assign rd_en   = busy;
  assign rd_addr = addr;
  assign rd_row  = row;
  assign rd_col  = col;
  assign rd_last = busy && end_of_frame;

  initial begin
    assert (WIDTH % 2 == 0 && WIDTH >= 2) else $error("scan_ctrl: WIDTH must be even");
  end

endmodule
