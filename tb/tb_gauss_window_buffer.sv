// tb_gauss_window_buffer: self-checking test of the window register array.
//
// Shifts random columns into a 3x3 and a 5x5 window with random idle cycles
// and, after every shift, compares every window element with a queue of the
// last KSIZE columns kept by the testbench (column 0 oldest). Also checks
// that reset clears the window.
module tb_gauss_window_buffer;
  localparam int unsigned PIX_W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic rst_n, en;
  logic [4:0][PIX_W-1:0] cin;
  logic [2:0][2:0][PIX_W-1:0] w3;
  logic [4:0][4:0][PIX_W-1:0] w5;

  gauss_window_buffer #(.KSIZE(3), .PIX_W(PIX_W)) dut3 (
    .clk(clk), .rst_n(rst_n), .en(en), .column_in(cin[2:0]), .window(w3));
  gauss_window_buffer #(.KSIZE(5), .PIX_W(PIX_W)) dut5 (
    .clk(clk), .rst_n(rst_n), .en(en), .column_in(cin), .window(w5));

  logic [4:0][PIX_W-1:0] hist [5];  // hist[4] = newest column

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 1; cin = '1;
    for (int i = 0; i < 5; i++) hist[i] = '0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (w3 !== '0 || w5 !== '0) begin failures++; $display("reset did not clear"); end
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      en = ($urandom_range(3) != 0);
      for (int r = 0; r < 5; r++) cin[r] = PIX_W'($urandom);
      if (en) begin
        for (int i = 0; i < 4; i++) hist[i] = hist[i+1];
        hist[4] = cin;
      end
      @(negedge clk);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (w3[r][c] !== hist[2+c][r]) begin
            failures++;
            $display("K3 n=%0d [%0d][%0d] got %0d exp %0d", n, r, c, w3[r][c], hist[2+c][r]);
          end
        end
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          checks++;
          if (w5[r][c] !== hist[c][r]) begin
            failures++;
            $display("K5 n=%0d [%0d][%0d] got %0d exp %0d", n, r, c, w5[r][c], hist[c][r]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
