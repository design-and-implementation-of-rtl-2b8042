// tb_rca: self-checking test of the ripple carry adder.
// The default 2-bit instance (the first group of the carry-select adder) and
// a 7-bit instance are checked exhaustively over a, b and cin against the
// integer sum {cout, sum} = a + b + cin.
module tb_rca;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7;

  rca          dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.WIDTH(7)) dut7 (.a(a7), .b(b7), .cin(ci7), .sum(s7), .cout(co7));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int c = 0; c < 2; c++) begin
          a2 = 2'(x); b2 = 2'(y); ci2 = 1'(c);
          #1;
          checks++;
          if ({co2, s2} !== 3'(x + y + c)) begin
            failures++;
            $display("FAIL rca2 %0d+%0d+%0d -> %0d", x, y, c, {co2, s2});
          end
        end
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++)
        for (int c = 0; c < 2; c++) begin
          a7 = 7'(x); b7 = 7'(y); ci7 = 1'(c);
          #1;
          checks++;
          if ({co7, s7} !== 8'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL rca7 %0d+%0d+%0d -> %0d", x, y, c, {co7, s7});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
