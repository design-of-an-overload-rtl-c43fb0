// tb_oci_add_tree: checks the adder tree as a 14-input channel adder (1-bit
// operands, 4-bit sum, combinational) and as a 9-operand 8-bit tree with the
// pipeline register (result one cycle later).
module tb_oci_add_tree;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] op14 [14];
  logic [3:0] s14;
  logic [7:0] op9 [9];
  logic [7:0] s9;

  oci_add_tree #(.K(14), .W(4), .PIPE(1'b0)) u_comb (.clk(clk), .rst_n(rst_n), .op(op14), .sum(s14));
  oci_add_tree #(.K(9),  .W(8), .PIPE(1'b1)) u_pipe (.clk(clk), .rst_n(rst_n), .op(op9),  .sum(s9));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp14, exp9, prev9;
    for (int i = 0; i < 14; i++) op14[i] = '0;
    for (int i = 0; i < 9; i++)  op9[i]  = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev9 = -1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // channel adder: at most 15 ones so the 4-bit sum does not wrap
      exp14 = 0;
      for (int i = 0; i < 14; i++) begin
        op14[i] = 4'($urandom_range(0, 1));
        exp14 += int'(op14[i]);
      end
      exp9 = 0;
      for (int i = 0; i < 9; i++) begin
        op9[i] = 8'($urandom);
        exp9 += int'(op9[i]);
      end
      #1;
      checks++;
      if (int'(s14) != exp14) begin
        failures++;
        $display("FAIL comb sum %0d expected %0d", s14, exp14);
      end
      @(posedge clk); #1;
      checks++;
      if (s9 != 8'(exp9)) begin
        failures++;
        $display("FAIL pipe sum %0d expected %0d", s9, 8'(exp9));
      end
      prev9 = exp9;
    end
    // pipelined output holds the value registered one edge earlier, not the current input
    @(negedge clk);
    for (int i = 0; i < 9; i++) op9[i] = 8'd1;
    #1;
    checks++;
    if (s9 != 8'(prev9)) failures++;
    @(posedge clk); #1;
    checks++;
    if (s9 != 8'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
