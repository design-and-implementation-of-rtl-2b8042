// tb_vedic_combine: self-checking test of one Vedic tree node. For operand
// pairs a, b the four half products are computed here with the built-in
// multiply and fed in as q0..q3; the node's output must equal a*b.
// N = 4 is exhaustive, the default N = 16 is random plus all-ones corners
// (which make both inner carries occur).
module tb_vedic_combine;
  int checks = 0, failures = 0;
  int c1_seen = 0, c2_seen = 0;

  logic [3:0]  q4 [4];
  logic [7:0]  p4;
  logic [15:0] q16 [4];
  logic [31:0] p16;

  vedic_combine #(.N(4)) dut4 (.q0(q4[0]), .q1(q4[1]), .q2(q4[2]), .q3(q4[3]), .p(p4));
  vedic_combine          dut16 (.q0(q16[0]), .q1(q16[1]), .q2(q16[2]), .q3(q16[3]), .p(p16));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t16(logic [15:0] a, logic [15:0] b);
    logic [7:0] al, ah, bl, bh;
    {ah, al} = a; {bh, bl} = b;
    q16[0] = al * bl; q16[1] = ah * bl; q16[2] = al * bh; q16[3] = ah * bh;
    #1;
    checks++;
    if (p16 !== 32'(a) * 32'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h*%h -> %h", a, b, p16);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        logic [4:0] mid;
        q4[0] = 4'((x % 4) * (y % 4));
        q4[1] = 4'((x / 4) * (y % 4));
        q4[2] = 4'((x % 4) * (y / 4));
        q4[3] = 4'((x / 4) * (y / 4));
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 4: %0d*%0d -> %0d", x, y, p4);
        end
        // inner carries, worked out from the half products
        mid = 5'(q4[1]) + 5'(q4[2]);
        if (mid[4]) c1_seen++;
        else if (5'(mid[3:0]) + 5'(q4[0][3:2]) > 5'd15) c2_seen++;
      end
    t16('1, '1);
    t16('1, 16'h0001);
    t16(16'h00FF, 16'hFF00);
    for (int n = 0; n < 5000; n++) t16(16'($urandom), 16'($urandom));
    // both carry cases of the 4x4 node must have been exercised
    checks++;
    if (c1_seen == 0 || c2_seen == 0) failures++;
    $display("carry c1 cases %0d, carry c2 cases %0d", c1_seen, c2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
