// gauss_pkg: integer Gaussian kernels and helpers shared by the filter.
//
// The filter supports the three discrete Gaussian kernels 3x3, 5x5 and 7x7.
// Each kernel is a symmetric table of small non-negative integers whose sum
// is the normaliser the weighted sum is divided by:
//   3x3: [1 2 1; 2 4 2; 1 2 1] / 16
//   5x5: rows 1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7 / ...      / 273
//   7x7: rows 0 0 1 2 1 0 0 / 0 3 13 22 13 3 0 / 1 13 59 97 59 13 1 /
//        2 22 97 159 97 22 2 / ... (mirrored)                   / 1003
// These values are the published fixed-point approximations of the Gaussian;
// a floating-point kernel is deliberately not supported, because it costs
// tens of times more logic for the same pixel rate.
// Coefficients are returned by constant functions so that the multipliers
// reduce to constants at elaboration.
package gauss_pkg;

  localparam int unsigned COEF_W = 8;  // largest coefficient is 159

  // One row of the upper-left quadrant is enough: all kernels are symmetric
  // in both directions. q(i) folds index i of a KSIZE-wide kernel onto 0..K/2.
  function automatic int unsigned fold(input int unsigned ksize, input int unsigned i);
    return (i <= ksize / 2) ? i : ksize - 1 - i;
  endfunction

  // Coefficient at row i, column j of the KSIZE x KSIZE kernel.
  function automatic int unsigned kernel_coef(input int unsigned ksize,
                                              input int unsigned i,
                                              input int unsigned j);
    int unsigned a, b;
    a = fold(ksize, i);
    b = fold(ksize, j);
    if (a > b) begin  // quadrant is symmetric about its diagonal
      int unsigned t;
      t = a; a = b; b = t;
    end
    case (ksize)
      3: case ({a[3:0], b[3:0]})
           8'h00: return 1;
           8'h01: return 2;
           8'h11: return 4;
           default: return 0;
         endcase
      5: case ({a[3:0], b[3:0]})
           8'h00: return 1;
           8'h01: return 4;
           8'h02: return 7;
           8'h11: return 16;
           8'h12: return 26;
           8'h22: return 41;
           default: return 0;
         endcase
      7: case ({a[3:0], b[3:0]})
           8'h00: return 0;
           8'h01: return 0;
           8'h02: return 1;
           8'h03: return 2;
           8'h11: return 3;
           8'h12: return 13;
           8'h13: return 22;
           8'h22: return 59;
           8'h23: return 97;
           8'h33: return 159;
           default: return 0;
         endcase
      default: return 0;
    endcase
  endfunction

  // Normaliser: the sum of the kernel's coefficients.
  function automatic int unsigned kernel_norm(input int unsigned ksize);
    case (ksize)
      3: return 16;
      5: return 273;
      7: return 1003;
      default: return 1;
    endcase
  endfunction

  // Number of registered levels of a balanced adder tree over n operands.
  function automatic int unsigned tree_levels(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  // Clock edges from a window to its filtered pixel in gauss_conv:
  // one multiply stage, the adder tree, one divide stage.
  function automatic int unsigned conv_latency(input int unsigned ksize);
    return tree_levels(ksize * ksize) + 2;
  endfunction

endpackage
