// tb_vedic_mult: self-checking test of the Vedic multiplier tree against the
// built-in multiply. N = 4 and N = 8 are exhaustive, the default N = 16 and
// N = 64 (the MAC's size) get corner operands and random operands.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]   p4;
  logic [7:0]  a8, b8;   logic [15:0]  p8;
  logic [15:0] a16, b16; logic [31:0]  p16;
  logic [63:0] a64, b64; logic [127:0] p64;

  vedic_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult           dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mult #(.N(64)) dut64 (.a(a64), .b(b64), .p(p64));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t16(logic [15:0] x, logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h*%h -> %h", x, y, p16);
    end
  endtask

  task automatic t64(logic [63:0] x, logic [63:0] y);
    a64 = x; b64 = y;
    #1;
    checks++;
    if (p64 !== 128'(x) * 128'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL 64: %h*%h -> %h", x, y, p64);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d*%0d -> %0d", x, y, p8);
        end
        if (x < 16 && y < 16) begin
          checks++;
          if (p4 !== 8'(x * y)) begin
            failures++;
            if (failures < 10) $display("FAIL 4: %0d*%0d -> %0d", x, y, p4);
          end
        end
      end
    t16('1, '1); t16('1, 16'd1); t16('0, '1); t16(16'h8000, 16'h8000);
    for (int n = 0; n < 20000; n++) t16(16'($urandom), 16'($urandom));
    t64('1, '1); t64('1, 64'd1); t64('0, '1); t64(64'h8000_0000_0000_0000, 64'd2);
    for (int k = 0; k < 64; k++) t64('1 >> k, '1);
    for (int n = 0; n < 5000; n++)
      t64({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
