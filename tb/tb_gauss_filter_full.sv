// tb_gauss_filter_full: one full 1080 x 1920 frame through the default
// filter (3x3 kernel, 8-bit pixels, no parameter overrides).
//
// The input is always valid and the output always ready, so the test also
// checks the frame time: 1080*1920 + 6 = 2,073,606 cycles from the first
// accepted pixel to the last output. Pixels come from a hash of the
// position; every output pixel, border flag and end-of-frame flag is
// compared with a reference computed here.
module tb_gauss_filter_full;
  localparam int ROWS = 1080;
  localparam int COLS = 1920;
  localparam int NPIX = ROWS * COLS;
  localparam int K [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       rst_n, in_valid, in_ready, out_valid, out_ready, out_border, out_last;
  logic [7:0] pixel_in, pixel_out;

  gauss_filter dut (
    .clk, .rst_n, .in_valid, .in_ready, .pixel_in,
    .out_valid, .out_ready, .pixel_out, .out_border, .out_last);

  function automatic logic [7:0] pix(input int r, input int c);
    int unsigned h;
    h = 32'(r) * 32'h85EB_CA6B ^ 32'(c) * 32'hC2B2_AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    return h[23:16];
  endfunction

  initial begin
    #(10 * (NPIX + 10000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int in_idx, out_idx, cycle, first_acc, last_out, n_border, n_last;
    in_idx = 0; out_idx = 0; cycle = 0; first_acc = -1; last_out = -1;
    n_border = 0; n_last = 0;
    rst_n = 0; in_valid = 0; out_ready = 1; pixel_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (out_idx < NPIX) begin
      @(negedge clk);
      cycle++;
      in_valid = (in_idx < NPIX);
      pixel_in = pix(in_idx / COLS, in_idx % COLS);
      #1;
      if (out_valid) begin
        int r, c, e;
        bit b;
        r = out_idx / COLS; c = out_idx % COLS;
        b = (r < 2 || c < 2);
        e = 0;
        if (!b) begin
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) e += int'(pix(r - 2 + i, c - 2 + j)) * K[i][j];
          e = e / 16;
        end
        checks++;
        if (int'(pixel_out) != e || out_border != b || out_last != (out_idx == NPIX - 1)) begin
          failures++;
          if (failures < 10)
            $display("(%0d,%0d): got %0d border %0d last %0d, expected %0d",
                     r, c, pixel_out, out_border, out_last, e);
        end
        if (out_border) n_border++;
        if (out_last) n_last++;
        last_out = cycle;
        out_idx++;
      end
      if (in_valid && in_ready) begin
        if (in_idx == 0) first_acc = cycle;
        in_idx++;
      end
    end
    $display("frame time %0d cycles, border outputs %0d", last_out - first_acc, n_border);
    checks += 3;
    if (last_out - first_acc != NPIX + 6) begin
      failures++;
      $display("frame time %0d, expected %0d", last_out - first_acc, NPIX + 6);
    end
    if (n_border != 2 * COLS + 2 * (ROWS - 2)) begin failures++; $display("border count wrong"); end
    if (n_last != 1) begin failures++; $display("end of frame not flagged once"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
