// gauss_adder_tree: pipelined balanced adder tree.
//
// Sums N operands of W bits in LEVELS = ceil(log2 N) register stages. Each
// stage adds neighbouring pairs of the previous stage's values; an odd value
// left over at a stage is carried to the next stage unchanged, so every
// operand reaches the output after exactly LEVELS enabled clock edges. A
// balanced tree keeps the logic depth per stage to one adder and the total
// register count low, which is the structure the convolution is meant to
// map to. The caller chooses W wide enough for the full sum; there is no
// overflow detection. With N = 1 the operand is passed through without
// registers (LEVELS = 0).
module gauss_adder_tree #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 12,
  localparam int unsigned LEVELS = (N <= 1) ? 0 : $clog2(N)
) (
  input  logic                clk,
  input  logic                en,
  input  logic [N-1:0][W-1:0] operands,
  output logic [W-1:0]        sum
);

  // Number of values alive after stage s (s = 0 is the input).
  function automatic int unsigned width_at(input int unsigned s);
    int unsigned n;
    n = N;
    for (int unsigned i = 0; i < s; i++) n = (n + 1) / 2;
    return n;
  endfunction

  if (LEVELS == 0) begin : g_pass
    assign sum = operands[0];
  end else begin : g_tree
    for (genvar s = 0; s < LEVELS; s++) begin : g_level
      localparam int unsigned NIN  = width_at(s);
      localparam int unsigned NOUT = width_at(s + 1);
      logic [NIN-1:0][W-1:0]  din;  // values entering this level
      logic [NOUT-1:0][W-1:0] q;    // registered results of this level

      if (s == 0) begin : g_first
        assign din = operands;
      end else begin : g_next
        assign din = g_level[s-1].q;
      end

      always_ff @(posedge clk) begin
        if (en) begin
          for (int k = 0; k < NOUT; k++) begin
            if (2 * k + 1 < NIN) q[k] <= din[2*k] + din[2*k+1];
            else                 q[k] <= din[2*k];
          end
        end
      end
    end
    assign sum = g_level[LEVELS-1].q[0];
  end

endmodule
