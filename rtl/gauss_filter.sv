// gauss_filter: streaming sliding-window Gaussian filter (top level).
//
// Pixels of a ROWS x COLS greyscale image enter one per clock in raster
// order. KSIZE-1 line buffers keep the previous rows, so every accepted
// pixel completes one image column of KSIZE pixels; that column is shifted
// into a KSIZE x KSIZE window register, and the window is convolved with the
// integer Gaussian kernel (3x3/16, 5x5/273 or 7x7/1003) in a pipelined
// multiply / adder-tree / divide datapath. Only KSIZE-1 rows plus the window
// are stored, never the whole frame.
//
// Output alignment: exactly one output per input pixel, in the same order.
// Output n is the filter result of the window whose bottom-right pixel is
// input n at (r, c), i.e. the smoothed value centred on input pixel
// (r - KSIZE/2, c - KSIZE/2). Where that window is not complete
// (r < KSIZE-1 or c < KSIZE-1) the output is 0 and out_border is set.
// out_last marks the output of the last pixel of a frame; the row and column
// counters then wrap and the next pixel starts a new frame.
//
// Interface: valid/ready on both sides. A pixel is taken when
// in_valid && in_ready, an output is delivered when out_valid && out_ready.
// When an output is offered and not taken the whole pipeline stalls and
// in_ready drops in the same cycle.
// Timing: without stalls a pixel accepted at edge t appears at the output
// after edge t + 1 + conv_latency(KSIZE) (7 edges for 3x3, 8 for 5x5, 9 for
// 7x7), and the filter sustains one pixel per clock, so a frame takes
// ROWS*COLS + conv_latency(KSIZE) cycles from its first pixel to its last
// output.
// The line/window buffer structure and the kernels follow the published
// design; the handshake, border convention, frame counters and reset are
// this design's own choices.
module gauss_filter
  import gauss_pkg::*;
#(
  parameter int unsigned ROWS  = 1080,
  parameter int unsigned COLS  = 1920,
  parameter int unsigned KSIZE = 3,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // input pixel stream
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] pixel_in,
  // output pixel stream
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PIX_W-1:0] pixel_out,
  output logic             out_border,
  output logic             out_last
);

  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned LAT   = conv_latency(KSIZE);

  // Side information carried along the datapath for each pixel.
  typedef struct packed {
    logic valid;
    logic border;
    logic last;
  } tag_t;

  logic stall, advance, accept;
  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;

  assign stall   = out_valid && !out_ready;
  assign advance = !stall;
  assign in_ready = advance;
  assign accept  = in_valid && in_ready;

  // ---- position of the next input pixel -------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row <= '0;
      col <= '0;
    end else if (accept) begin
      if (col == COL_W'(COLS - 1)) begin
        col <= '0;
        row <= (row == ROW_W'(ROWS - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  // ---- line buffers and window ----------------------------------------
  logic [KSIZE-1:0][PIX_W-1:0]            column;
  logic [KSIZE-1:0][KSIZE-1:0][PIX_W-1:0] window;

  gauss_line_buffer #(.KSIZE(KSIZE), .COLS(COLS), .PIX_W(PIX_W)) u_lines (
    .clk        (clk),
    .en         (accept),
    .col        (col),
    .pixel_in   (pixel_in),
    .column_out (column)
  );

  gauss_window_buffer #(.KSIZE(KSIZE), .PIX_W(PIX_W)) u_window (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (accept),
    .column_in (column),
    .window    (window)
  );

  // ---- convolution datapath ----------------------------------------------
  logic [PIX_W-1:0] conv_pixel;

  gauss_conv #(.KSIZE(KSIZE), .PIX_W(PIX_W)) u_conv (
    .clk       (clk),
    .en        (advance),
    .window    (window),
    .pixel_out (conv_pixel)
  );

  // ---- tags: tag[0] belongs to the window register, tag[LAT] to the
  // convolution result ------------------------------------------------------
  tag_t tag [LAT+1];
  tag_t tag_in;

  assign tag_in.valid  = accept;
  assign tag_in.border = (row < ROW_W'(KSIZE - 1)) || (col < COL_W'(KSIZE - 1));
  assign tag_in.last   = (row == ROW_W'(ROWS - 1)) && (col == COL_W'(COLS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= LAT; k++) tag[k] <= '0;
    end else if (advance) begin
      tag[0] <= tag_in;
      for (int k = 1; k <= LAT; k++) tag[k] <= tag[k-1];
    end
  end

  assign out_valid  = tag[LAT].valid;
  assign out_border = tag[LAT].border;
  assign out_last   = tag[LAT].last;
  assign pixel_out  = tag[LAT].border ? '0 : conv_pixel;

  // An offered output must stay put until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(pixel_out) && $stable(out_last))
    else $error("gauss_filter: output changed while stalled");

endmodule
