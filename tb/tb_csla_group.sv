// tb_csla_group: self-checking test of the reduced-complexity carry-select
// group. Widths 2 (default), 3, 4 and 5, the group sizes of the 16-bit
// adder, are checked exhaustively over a, b and cin against a + b + cin.
module tb_csla_group;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin, co2, co3, co4, co5;

  csla_group             dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));
  csla_group #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(co3));
  csla_group #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  csla_group #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", name, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a2 = 2'(x); b2 = 2'(y);
          a3 = 3'(x); b3 = 3'(y);
          a4 = 4'(x); b4 = 4'(y);
          a5 = 5'(x); b5 = 5'(y);
          cin = 1'(c);
          #1;
          if (x < 4 && y < 4)   check("w2", int'({co2, s2}), x + y + c);
          if (x < 8 && y < 8)   check("w3", int'({co3, s3}), x + y + c);
          if (x < 16 && y < 16) check("w4", int'({co4, s4}), x + y + c);
          check("w5", int'({co5, s5}), x + y + c);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
