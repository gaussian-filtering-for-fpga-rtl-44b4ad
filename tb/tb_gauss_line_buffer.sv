// tb_gauss_line_buffer: self-checking test of the row buffers.
//
// Streams several rows of pseudo-random pixels into a 3x3 (two stored rows)
// and a 5x5 (four stored rows) line buffer with random idle cycles, and
// before every accepted pixel compares the presented column with the pixels
// that a reference copy of the image holds at the same column in the rows
// above. Idle cycles must not disturb the stored rows.
module tb_gauss_line_buffer;
  localparam int unsigned COLS  = 7;
  localparam int unsigned ROWS  = 9;
  localparam int unsigned PIX_W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic             en;
  logic [2:0]       col;
  logic [PIX_W-1:0] pix;
  logic [2:0][PIX_W-1:0] col3;
  logic [4:0][PIX_W-1:0] col5;

  gauss_line_buffer #(.KSIZE(3), .COLS(COLS), .PIX_W(PIX_W)) dut3 (
    .clk(clk), .en(en), .col(col), .pixel_in(pix), .column_out(col3));
  gauss_line_buffer #(.KSIZE(5), .COLS(COLS), .PIX_W(PIX_W)) dut5 (
    .clk(clk), .en(en), .col(col), .pixel_in(pix), .column_out(col5));

  logic [PIX_W-1:0] img [ROWS][COLS];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; col = 0; pix = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = PIX_W'($urandom);
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        // random idle cycles with junk on the inputs
        while ($urandom_range(3) == 0) begin
          en = 0; col = 3'($urandom_range(COLS - 1)); pix = PIX_W'($urandom);
          @(negedge clk);
        end
        en = 1; col = 3'(c); pix = img[r][c];
        #1;
        for (int k = 0; k < 3; k++) begin
          if (r >= 2 - k) begin
            checks++;
            if (col3[k] !== img[r-2+k][c]) begin
              failures++;
              $display("K3 r=%0d c=%0d k=%0d got %0d exp %0d", r, c, k, col3[k], img[r-2+k][c]);
            end
          end
        end
        for (int k = 0; k < 5; k++) begin
          if (r >= 4 - k) begin
            checks++;
            if (col5[k] !== img[r-4+k][c]) begin
              failures++;
              $display("K5 r=%0d c=%0d k=%0d got %0d exp %0d", r, c, k, col5[k], img[r-4+k][c]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
