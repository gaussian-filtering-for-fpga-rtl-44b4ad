// tb_gauss_filter: end-to-end test of the streaming Gaussian filter.
//
// Runs three small filters side by side, one per kernel size (3x3, 5x5,
// 7x7), each over three generated frames (see gauss_filter_harness): the
// first frame unstalled with its frame time checked, the others with random
// input bubbles and output back-pressure. Every output pixel, border flag
// and end-of-frame flag is checked. Each mechanism (stall, input bubble,
// border output, interior output, frame end, frame wrap-around without
// reset) must have occurred at least once per instance.
module tb_gauss_filter;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0;
  int failures = 0;

  int   c [3], f [3], st [3], bu [3], bo [3], in [3], la [3];
  logic d [3];

  gauss_filter_harness #(.ROWS(10), .COLS(13), .KSIZE(3)) h3 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_stall(st[0]), .n_bubble(bu[0]),
    .n_border(bo[0]), .n_interior(in[0]), .n_last(la[0]), .done(d[0]));
  gauss_filter_harness #(.ROWS(9), .COLS(16), .KSIZE(5)) h5 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_stall(st[1]), .n_bubble(bu[1]),
    .n_border(bo[1]), .n_interior(in[1]), .n_last(la[1]), .done(d[1]));
  gauss_filter_harness #(.ROWS(11), .COLS(12), .KSIZE(7)) h7 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_stall(st[2]), .n_bubble(bu[2]),
    .n_border(bo[2]), .n_interior(in[2]), .n_last(la[2]), .done(d[2]));

  initial begin
    #200000;
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
      $display("filter %0d: stalls %0d bubbles %0d border %0d interior %0d frames %0d",
               2 * k + 3, st[k], bu[k], bo[k], in[k], la[k]);
      checks += c[k];
      failures += f[k];
      checks += 5;
      if (st[k] == 0) begin failures++; $display("no stall happened"); end
      if (bu[k] == 0) begin failures++; $display("no input bubble happened"); end
      if (bo[k] == 0) begin failures++; $display("no border output happened"); end
      if (in[k] == 0) begin failures++; $display("no interior output happened"); end
      if (la[k] != 3) begin failures++; $display("expected 3 frame ends"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
