// tb_bk_adder: checks the Brent-Kung adder exhaustively at WIDTH = 8 (all a,
// b, cin) and with random operands at WIDTH = 5 and 13, against a + b + cin.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [4:0]  a5, b5, s5;   logic c5, co5;
  logic [12:0] a13, b13, s13; logic c13, co13;

  bk_adder #(.WIDTH(8))  u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  bk_adder #(.WIDTH(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  bk_adder #(.WIDTH(13)) u13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} != 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL w8: %0d + %0d + %0d = %0d", x, y, c, {co8, s8});
          end
        end
    for (int t = 0; t < 5000; t++) begin
      a5 = 5'($urandom); b5 = 5'($urandom); c5 = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
      #1;
      checks += 2;
      if ({co5, s5} != 6'(int'(a5) + int'(b5) + int'(c5))) failures++;
      if ({co13, s13} != 14'(int'(a13) + int'(b13) + int'(c13))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
