// gauss_line_buffer: the KSIZE-1 row buffers of the sliding-window filter.
//
// The buffer holds the most recent KSIZE-1 image rows, one array of COLS
// pixels per row (each maps to one block RAM). For an accepted pixel at
// column `col` the module presents, combinationally, the whole KSIZE-pixel
// image column ending at that pixel:
//   column_out[0]       = pixel KSIZE-1 rows above (oldest)
//   column_out[KSIZE-2] = pixel one row above
//   column_out[KSIZE-1] = pixel_in
// On the clock edge with `en` high the column is written back shifted up by
// one row: the oldest pixel is dropped and pixel_in takes the bottom row.
// After one full image row has passed, row k of the buffer therefore holds
// the pixels KSIZE-1-k rows above the current row.
// Using KSIZE-1 buffers and the shift-up update follows the published
// sliding-window scheme; the asynchronous read with write-back to the same
// address in one cycle is this design's choice. The stored rows are not
// reset: the filter marks every window that could contain them as border.
module gauss_line_buffer #(
  parameter int unsigned KSIZE = 3,
  parameter int unsigned COLS  = 1920,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic [COL_W-1:0]              col,
  input  logic [PIX_W-1:0]              pixel_in,
  output logic [KSIZE-1:0][PIX_W-1:0]   column_out
);

  localparam int unsigned NBUF = KSIZE - 1;

  // One memory per stored row, index 0 = oldest row.
  logic [PIX_W-1:0] rows [NBUF][COLS];

  always_comb begin
    for (int k = 0; k < NBUF; k++) column_out[k] = rows[k][col];
    column_out[KSIZE-1] = pixel_in;
  end

  // Write the column back shifted up by one: row k takes what was row k+1,
  // the bottom row takes the new pixel.
  for (genvar k = 0; k < NBUF; k++) begin : g_row
    always_ff @(posedge clk) begin
      if (en) rows[k][col] <= column_out[k+1];
    end
  end

endmodule
