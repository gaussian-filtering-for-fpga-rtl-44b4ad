// tb_gauss_filter_kernels: one full 1080 x 1920 frame through each of the
// three kernel sizes, 3x3, 5x5 and 7x7, as in a kernel-size comparison.
//
// Each filter gets an unstalled frame (gauss_filter_harness with one frame):
// every output is checked against the reference, and the frame time must be
// 1080*1920 + LAT cycles with LAT = 6, 7, 8. The measured frame times are
// printed for comparison with an HLS build of the same filter, which reports
// 2,073,606 / 2,073,615 / 2,073,619 cycles.
module tb_gauss_filter_kernels;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0;
  int failures = 0;

  int   c [3], f [3], st [3], bu [3], bo [3], in [3], la [3];
  logic d [3];

  gauss_filter_harness #(.ROWS(1080), .COLS(1920), .KSIZE(3), .NFRAMES(1)) h3 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_bubble(bu[0]),
    .n_border(bo[0]), .n_interior(in[0]), .n_last(la[0]), .done(d[0]));
  gauss_filter_harness #(.ROWS(1080), .COLS(1920), .KSIZE(5), .NFRAMES(1)) h5 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_bubble(bu[1]),
    .n_border(bo[1]), .n_interior(in[1]), .n_last(la[1]), .done(d[1]));
  gauss_filter_harness #(.ROWS(1080), .COLS(1920), .KSIZE(7), .NFRAMES(1)) h7 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_stall(st[2]), .n_bubble(bu[2]),
    .n_border(bo[2]), .n_interior(in[2]), .n_last(la[2]), .done(d[2]));

  initial begin
    #(10 * (1080 * 1920 + 10000));
    failures++;
    $display("watchdog expired");
    for (int k = 0; k < 3; k++) begin
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    for (int k = 0; k < 3; k++) begin
      $display("%0dx%0d: outputs %0d, border %0d, failures %0d", 2 * k + 3, 2 * k + 3,
               bo[k] + in[k], bo[k], f[k]);
      checks += c[k];
      failures += f[k];
      // border count: first K-1 rows and first K-1 columns of the other rows
      checks++;
      if (bo[k] != (2 * k + 2) * 1920 + (1080 - 2 * k - 2) * (2 * k + 2)) begin
        failures++;
        $display("border output count %0d wrong", bo[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
