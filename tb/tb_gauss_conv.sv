// tb_gauss_conv: self-checking test of the Gaussian convolution datapath.
//
// Presents random windows (plus all-255 and all-0 windows) to 3x3, 5x5 and
// 7x7 instances with random cycles where `en` is low. A reference written
// here from the full kernel tables computes floor(sum(window*kernel)/norm);
// each output must equal the reference for the window presented exactly
// LATENCY enabled edges earlier: 6 for 3x3, 7 for 5x5 and 8 for 7x7.
module tb_gauss_conv;
  localparam int unsigned PIX_W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic en;

  // Reference kernels, full tables.
  localparam int K3 [3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
  localparam int K5 [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                               '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};
  localparam int K7 [7][7] = '{'{0, 0, 1, 2, 1, 0, 0}, '{0, 3, 13, 22, 13, 3, 0},
                               '{1, 13, 59, 97, 59, 13, 1}, '{2, 22, 97, 159, 97, 22, 2},
                               '{1, 13, 59, 97, 59, 13, 1}, '{0, 3, 13, 22, 13, 3, 0},
                               '{0, 0, 1, 2, 1, 0, 0}};

  logic [6:0][6:0][PIX_W-1:0] win;  // the 7x7 window; smaller kernels use its top-left part
  logic [2:0][2:0][PIX_W-1:0] w3;
  logic [4:0][4:0][PIX_W-1:0] w5;
  logic [PIX_W-1:0] p3, p5, p7;

  always_comb
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        w5[i][j] = win[i][j];
        if (i < 3 && j < 3) w3[i][j] = win[i][j];
      end

  gauss_conv #(.KSIZE(3), .PIX_W(PIX_W)) c3 (.clk(clk), .en(en), .window(w3), .pixel_out(p3));
  gauss_conv #(.KSIZE(5), .PIX_W(PIX_W)) c5 (.clk(clk), .en(en), .window(w5), .pixel_out(p5));
  gauss_conv #(.KSIZE(7), .PIX_W(PIX_W)) c7 (.clk(clk), .en(en), .window(win), .pixel_out(p7));

  function automatic int ref3(input logic [6:0][6:0][PIX_W-1:0] w);
    int s = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) s += int'(w[i][j]) * K3[i][j];
    return s / 16;
  endfunction
  function automatic int ref5(input logic [6:0][6:0][PIX_W-1:0] w);
    int s = 0;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += int'(w[i][j]) * K5[i][j];
    return s / 273;
  endfunction
  function automatic int ref7(input logic [6:0][6:0][PIX_W-1:0] w);
    int s = 0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) s += int'(w[i][j]) * K7[i][j];
    return s / 1003;
  endfunction

  int e3 [8], e5 [8], e7 [8];  // expected results, index 0 = latest enabled edge
  int nen = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; win = '0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      en = ($urandom_range(4) != 0);
      if (n == 20)      win = '1;
      else if (n == 21) win = '0;
      else for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) win[i][j] = PIX_W'($urandom);
      if (en) begin
        for (int k = 7; k > 0; k--) begin e3[k] = e3[k-1]; e5[k] = e5[k-1]; e7[k] = e7[k-1]; end
        e3[0] = ref3(win); e5[0] = ref5(win); e7[0] = ref7(win);
        nen++;
      end
      @(negedge clk);
      if (nen >= 9) begin
        checks += 3;
        if (int'(p3) != e3[5]) begin failures++; $display("3x3 got %0d exp %0d", p3, e3[5]); end
        if (int'(p5) != e5[6]) begin failures++; $display("5x5 got %0d exp %0d", p5, e5[6]); end
        if (int'(p7) != e7[7]) begin failures++; $display("7x7 got %0d exp %0d", p7, e7[7]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
