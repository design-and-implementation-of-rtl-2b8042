// tb_sqrt_csla: self-checking test of the square-root carry-select adder.
// The default 16-bit adder gets carry-chain corner cases (all-ones plus one,
// a carry ripple through every group boundary) and random operands; a
// 128-bit instance, the accumulator width of the MAC, gets random and corner
// operands. Results are compared with the built-in addition.
module tb_sqrt_csla;
  int checks = 0, failures = 0;

  logic [15:0]  a, b, s;
  logic         cin, co;
  logic [127:0] wa, wb, ws;
  logic         wci, wco;

  sqrt_csla                 dut   (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  sqrt_csla #(.WIDTH(128))  dut_w (.a(wa), .b(wb), .cin(wci), .sum(ws), .cout(wco));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t16(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 16b %h+%h+%b -> %h exp %h", x, y, c, {co, s}, exp);
    end
  endtask

  task automatic t128(logic [127:0] x, logic [127:0] y, logic c);
    logic [128:0] exp;
    wa = x; wb = y; wci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 129'(c);
    checks++;
    if ({wco, ws} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 128b %h+%h+%b", x, y, c);
    end
  endtask

  initial begin
    t16(16'hFFFF, 16'h0000, 1'b1);
    t16(16'hFFFF, 16'h0001, 1'b0);
    t16(16'hFFFF, 16'hFFFF, 1'b1);
    t16(16'h0000, 16'h0000, 1'b0);
    // carry generated just below each group boundary (bits 1, 3, 6, 10)
    for (int k = 0; k < 16; k++) begin
      t16(16'(1) << k, 16'hFFFF << k, 1'b0);
      t16(16'hFFFF >> k, 16'h0001, 1'b0);
      t16(16'hFFFF >> k, 16'h0000, 1'b1);
    end
    for (int n = 0; n < 20000; n++)
      t16(16'($urandom), 16'($urandom), 1'($urandom));

    t128('1, '0, 1'b1);
    t128('1, '1, 1'b1);
    t128('1, 128'd1, 1'b0);
    for (int k = 0; k < 128; k++) t128('1 >> k, 128'd1, 1'b0);
    for (int n = 0; n < 5000; n++)
      t128({$urandom, $urandom, $urandom, $urandom},
           {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
