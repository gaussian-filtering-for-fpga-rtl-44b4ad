// gauss_filter_harness: drives and checks one gauss_filter instance.
//
// Streams NFRAMES generated frames of ROWS x COLS pixels through the filter.
// Pixel values come from a hash of (frame, row, column), so the expected
// output of every position can be recomputed here from the kernel tables
// without storing the image. Frame 0 runs with the input always valid and
// the output always ready and checks the frame time: ROWS*COLS + LAT cycles
// from the first accepted pixel to the last output, with LAT the convolution
// pipeline depth (6, 7, 8 for 3x3, 5x5, 7x7). Later frames insert random
// input bubbles and random output back-pressure (stalls).
// Every output is checked for value, border flag and end-of-frame flag, and
// the harness counts how often each mechanism occurred: stalls, input
// bubbles, border outputs, interior outputs and frame ends.
module gauss_filter_harness #(
  parameter int unsigned ROWS    = 10,
  parameter int unsigned COLS    = 13,
  parameter int unsigned KSIZE   = 3,
  parameter int unsigned NFRAMES = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_bubble,
  output int   n_border,
  output int   n_interior,
  output int   n_last,
  output logic done
);
  localparam int unsigned NPIX = ROWS * COLS;

  localparam int K3 [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
  localparam int K5 [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                               '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};
  localparam int K7 [7][7] = '{'{0, 0, 1, 2, 1, 0, 0}, '{0, 3, 13, 22, 13, 3, 0},
                               '{1, 13, 59, 97, 59, 13, 1}, '{2, 22, 97, 159, 97, 22, 2},
                               '{1, 13, 59, 97, 59, 13, 1}, '{0, 3, 13, 22, 13, 3, 0},
                               '{0, 0, 1, 2, 1, 0, 0}};
  localparam int LAT  = (KSIZE == 3) ? 6 : (KSIZE == 5) ? 7 : 8;
  localparam int NORM = (KSIZE == 3) ? 16 : (KSIZE == 5) ? 273 : 1003;

  logic       in_valid, in_ready, out_valid, out_ready, out_border, out_last;
  logic [7:0] pixel_in, pixel_out;

  gauss_filter #(.ROWS(ROWS), .COLS(COLS), .KSIZE(KSIZE), .PIX_W(8)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .pixel_in,
    .out_valid, .out_ready, .pixel_out, .out_border, .out_last);

  function automatic logic [7:0] pix(input int f, input int r, input int c);
    int unsigned h;
    h = 32'(f) * 32'h9E37_79B9 ^ 32'(r) * 32'h85EB_CA6B ^ 32'(c) * 32'hC2B2_AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    return h[23:16];
  endfunction

  function automatic int coef(input int i, input int j);
    case (KSIZE)
      3: return K3[i][j];
      5: return K5[i][j];
      default: return K7[i][j];
    endcase
  endfunction

  // expected output for the window whose bottom-right input is (r, c)
  function automatic int expected(input int f, input int r, input int c);
    int s = 0;
    if (r < KSIZE - 1 || c < KSIZE - 1) return 0;
    for (int i = 0; i < KSIZE; i++)
      for (int j = 0; j < KSIZE; j++)
        s += int'(pix(f, r - KSIZE + 1 + i, c - KSIZE + 1 + j)) * coef(i, j);
    return s / NORM;
  endfunction

  initial begin
    int in_idx, out_idx, cycle, first_acc, last_out;
    bit busy;
    checks = 0; failures = 0; n_stall = 0; n_bubble = 0;
    n_border = 0; n_interior = 0; n_last = 0; done = 0;
    in_valid = 0; out_ready = 0; pixel_in = '0;
    in_idx = 0; out_idx = 0; cycle = 0; first_acc = -1; last_out = -1;
    @(posedge rst_n);
    while (out_idx < NFRAMES * NPIX) begin
      @(negedge clk);
      cycle++;
      busy = (in_idx >= NPIX) || (out_idx >= NPIX);  // past the timed first frame
      // input side
      if (in_idx < NFRAMES * NPIX) begin
        in_valid = !(busy && $urandom_range(3) == 0);
        pixel_in = pix(in_idx / NPIX, (in_idx % NPIX) / COLS, in_idx % COLS);
      end else begin
        in_valid = 0;
      end
      if (!in_valid && in_idx < NFRAMES * NPIX) n_bubble++;
      // output side
      out_ready = !(busy && out_idx >= NPIX && $urandom_range(2) == 0);
      #1;
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        int f, r, c, e;
        f = out_idx / NPIX; r = (out_idx % NPIX) / COLS; c = out_idx % COLS;
        e = expected(f, r, c);
        checks++;
        if (int'(pixel_out) != e || out_border != (r < KSIZE - 1 || c < KSIZE - 1) ||
            out_last != (r == ROWS - 1 && c == COLS - 1)) begin
          failures++;
          if (failures < 10)
            $display("K%0d frame %0d (%0d,%0d): got %0d border %0d last %0d, expected %0d",
                     KSIZE, f, r, c, pixel_out, out_border, out_last, e);
        end
        if (out_border) n_border++; else n_interior++;
        if (out_last) n_last++;
        if (out_idx == NPIX - 1) last_out = cycle;
        out_idx++;
      end
      if (in_valid && in_ready) begin
        if (in_idx == 0) first_acc = cycle;
        in_idx++;
      end
    end
    // frame time of the unstalled first frame
    $display("K%0d: frame time %0d cycles", KSIZE, last_out - first_acc);
    checks++;
    if (last_out - first_acc != int'(NPIX) + LAT) begin
      failures++;
      $display("K%0d frame time %0d cycles, expected %0d", KSIZE, last_out - first_acc,
               int'(NPIX) + LAT);
    end
    @(negedge clk);
    done = 1;
  end
endmodule
