// tb_gauss_adder_tree: self-checking test of the pipelined adder tree.
//
// Drives random operand sets into trees of 9, 25, 49 and 5 operands, holding
// `en` low on random cycles, and checks that each output equals the sum of
// the operand set presented exactly LEVELS = ceil(log2 N) enabled edges
// earlier, computed by the testbench.
module tb_gauss_adder_tree;
  localparam int unsigned W = 18;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic en;

  logic [48:0][W-1:0] ops;
  logic [W-1:0] s9, s25, s49, s5;

  gauss_adder_tree #(.N(9),  .W(W)) t9  (.clk(clk), .en(en), .operands(ops[8:0]),  .sum(s9));
  gauss_adder_tree #(.N(25), .W(W)) t25 (.clk(clk), .en(en), .operands(ops[24:0]), .sum(s25));
  gauss_adder_tree #(.N(49), .W(W)) t49 (.clk(clk), .en(en), .operands(ops[48:0]), .sum(s49));
  gauss_adder_tree #(.N(5),  .W(W)) t5  (.clk(clk), .en(en), .operands(ops[4:0]),  .sum(s5));

  // expected sums of past operand sets, index 0 = most recent enabled edge
  logic [W-1:0] h9 [8], h25 [8], h49 [8], h5 [8];
  int unsigned nen = 0;

  function automatic logic [W-1:0] sum_of(input logic [48:0][W-1:0] o, input int n);
    logic [W-1:0] s = '0;
    for (int i = 0; i < n; i++) s += o[i];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; ops = '0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      en = ($urandom_range(4) != 0);
      for (int i = 0; i < 49; i++) ops[i] = W'($urandom_range(4095));
      if (en) begin
        for (int k = 7; k > 0; k--) begin
          h9[k] = h9[k-1]; h25[k] = h25[k-1]; h49[k] = h49[k-1]; h5[k] = h5[k-1];
        end
        h9[0] = sum_of(ops, 9); h25[0] = sum_of(ops, 25);
        h49[0] = sum_of(ops, 49); h5[0] = sum_of(ops, 5);
        nen++;
      end
      @(negedge clk);
      // after this edge the tree of N shows the set from LEVELS-1 entries back
      if (nen >= 6) begin
        checks += 4;
        if (s9  !== h9[3])  begin failures++; $display("N=9 got %0d exp %0d",  s9,  h9[3]);  end
        if (s25 !== h25[4]) begin failures++; $display("N=25 got %0d exp %0d", s25, h25[4]); end
        if (s49 !== h49[5]) begin failures++; $display("N=49 got %0d exp %0d", s49, h49[5]); end
        if (s5  !== h5[2])  begin failures++; $display("N=5 got %0d exp %0d",  s5,  h5[2]);  end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
