// gauss_window_buffer: the KSIZE x KSIZE neighbourhood register array.
//
// On every clock edge with `en` high the window moves one pixel to the right
// across the image: each column shifts one place left, the leftmost (oldest)
// column is dropped and column_in, the image column delivered by the line
// buffer, is loaded into the rightmost column.
//   window[r][c]: r = 0 is the oldest row (top), c = 0 the oldest column
//   column_in[r]: same row order as window
// The window is registered, so it reflects the pixels accepted up to the
// previous edge. The shift direction follows the published sliding-window
// scheme; the synchronous active-low reset that clears it is this design's
// choice.
module gauss_window_buffer #(
  parameter int unsigned KSIZE = 3,
  parameter int unsigned PIX_W = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   en,
  input  logic [KSIZE-1:0][PIX_W-1:0]            column_in,
  output logic [KSIZE-1:0][KSIZE-1:0][PIX_W-1:0] window
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window <= '0;
    end else if (en) begin
      for (int r = 0; r < KSIZE; r++) begin
        for (int c = 0; c < KSIZE - 1; c++) window[r][c] <= window[r][c+1];
        window[r][KSIZE-1] <= column_in[r];
      end
    end
  end

endmodule
