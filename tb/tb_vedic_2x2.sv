// tb_vedic_2x2: exhaustive self-checking test of the 2x2 Vedic multiplier
// against the integer product.
module tb_vedic_2x2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (p !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", x, y, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
