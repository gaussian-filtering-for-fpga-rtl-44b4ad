// gauss_conv: fixed-point Gaussian convolution of one window.
//
// Computes  pixel_out = floor( sum_{i,j} window[i][j] * K[i][j] / NORM )
// for the integer kernel K of size KSIZE (3, 5 or 7) and its normaliser NORM
// (16, 273, 1003) taken from gauss_pkg. Since the kernel sums to NORM the
// result always fits in PIX_W bits.
// Pipeline, every stage advancing when `en` is high:
//   stage 1           KSIZE*KSIZE constant multiplications, registered
//   stages 2..1+L     balanced adder tree, L = ceil(log2(KSIZE*KSIZE))
//   stage 2+L         division by the constant NORM, registered
// so pixel_out belongs to the window presented LATENCY = L + 2 enabled edges
// earlier (6 for 3x3, 7 for 5x5, 8 for 7x7; gauss_pkg::conv_latency). Multiplying the window by the
// integer kernel and summing in a balanced tree follows the published
// design; the stage split and truncating division are this design's choices.
module gauss_conv
  import gauss_pkg::*;
#(
  parameter int unsigned KSIZE = 3,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned NTAP    = KSIZE * KSIZE,
  localparam int unsigned NORM    = kernel_norm(KSIZE),
  localparam int unsigned SUM_W   = PIX_W + $clog2(NORM)
) (
  input  logic                                   clk,
  input  logic                                   en,
  input  logic [KSIZE-1:0][KSIZE-1:0][PIX_W-1:0] window,
  output logic [PIX_W-1:0]                       pixel_out
);

  logic [NTAP-1:0][SUM_W-1:0] products;
  logic [SUM_W-1:0]           sum;

  // Stage 1: window times kernel, one product per tap.
  for (genvar i = 0; i < KSIZE; i++) begin : g_row
    for (genvar j = 0; j < KSIZE; j++) begin : g_col
      localparam logic [COEF_W-1:0] COEF = COEF_W'(kernel_coef(KSIZE, i, j));
      always_ff @(posedge clk) begin
        if (en) products[i*KSIZE+j] <= SUM_W'(window[i][j] * COEF);
      end
    end
  end

  // Stages 2..1+L: balanced adder tree.
  gauss_adder_tree #(.N(NTAP), .W(SUM_W)) u_tree (
    .clk      (clk),
    .en       (en),
    .operands (products),
    .sum      (sum)
  );

  // Last stage: normalise.
  always_ff @(posedge clk) begin
    if (en) pixel_out <= PIX_W'(sum / SUM_W'(NORM));
  end

endmodule
