// tb_vedic_mac: end-to-end, self-checking test of the 64-bit MAC at its
// default parameters (N = 64, 128-bit accumulator).
//
// A reference accumulator is kept here with the built-in multiply and add.
// The test runs a sequence of dot products: each starts with a clearing
// cycle (clr = 1) and continues with accumulating cycles; idle cycles with
// en = 0 are mixed in and must hold the accumulator; all-ones operands force
// the 128-bit accumulator to wrap, which must raise acc_cout; one reset in
// the middle must clear everything. After every clock edge the accumulator
// must show the result of the operands of exactly that edge (one MAC per
// cycle, one cycle latency). Each mechanism is counted and one that never
// happened counts as a failure.
module tb_vedic_mac;
  localparam int unsigned N = 64;
  localparam int unsigned W = 2 * N;

  int checks = 0, failures = 0;
  int n_load = 0, n_acc = 0, n_hold = 0, n_wrap = 0, n_reset = 0;
  int cycles = 0;

  logic          clk = 1'b0;
  logic          rst_n, en, clr;
  logic [N-1:0]  a, b;
  logic [W-1:0]  acc;
  logic          acc_cout;

  logic [W-1:0]  ref_acc;
  logic          ref_cout;

  vedic_mac dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr),
    .a(a), .b(b), .acc(acc), .acc_cout(acc_cout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one set of inputs, clock once, update the model and compare.
  task automatic step(logic e, logic c, logic [N-1:0] x, logic [N-1:0] y);
    logic [W:0] sum;
    en = e; clr = c; a = x; b = y;
    @(posedge clk);
    #1;
    if (e) begin
      sum = {1'b0, (c ? '0 : ref_acc)} + {1'b0, W'(x) * W'(y)};
      ref_acc  = sum[W-1:0];
      ref_cout = sum[W];
      if (c) n_load++; else n_acc++;
      if (sum[W]) n_wrap++;
    end else begin
      n_hold++;
    end
    checks++;
    if (acc !== ref_acc || acc_cout !== ref_cout) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d en=%b clr=%b a=%h b=%h: acc=%h cout=%b exp %h %b",
                 cycles, e, c, x, y, acc, acc_cout, ref_acc, ref_cout);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    #3;
    rst_n = 1'b1;
    ref_acc = '0; ref_cout = 1'b0;
    n_reset++;
    checks++;
    if (acc !== '0 || acc_cout !== 1'b0) begin
      failures++;
      $display("FAIL reset: acc=%h cout=%b", acc, acc_cout);
    end
  endtask

  function automatic logic [N-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    @(negedge clk);
    do_reset();

    // dot products of random vectors, with idle cycles
    for (int v = 0; v < 40; v++) begin
      step(1'b1, 1'b1, rnd64(), rnd64());
      for (int k = 0; k < 15; k++) begin
        if ($urandom_range(0, 4) == 0) step(1'b0, 1'($urandom), rnd64(), rnd64());
        step(1'b1, 1'b0, rnd64(), rnd64());
      end
    end

    // small known case: 3*4 + 5*6 + 7*8 = 98
    step(1'b1, 1'b1, 64'd3, 64'd4);
    step(1'b1, 1'b0, 64'd5, 64'd6);
    step(1'b1, 1'b0, 64'd7, 64'd8);
    checks++;
    if (acc !== W'(98)) begin
      failures++;
      $display("FAIL known dot product: %0d", acc);
    end

    // force wrap-around of the accumulator with all-ones operands
    step(1'b1, 1'b1, '1, '1);
    step(1'b1, 1'b0, '1, '1);
    step(1'b1, 1'b0, '1, '1);
    step(1'b0, 1'b0, '1, '1);

    // reset in the middle of an accumulation
    step(1'b1, 1'b0, rnd64(), rnd64());
    @(negedge clk);
    do_reset();
    step(1'b1, 1'b0, 64'd10, 64'd11);
    checks++;
    if (acc !== W'(110)) begin
      failures++;
      $display("FAIL after reset: %0d", acc);
    end

    $display("mechanisms: load=%0d accumulate=%0d hold=%0d wrap=%0d reset=%0d",
             n_load, n_acc, n_hold, n_wrap, n_reset);
    if (n_load == 0)  begin failures++; $display("FAIL no load cycle");  end
    if (n_acc == 0)   begin failures++; $display("FAIL no accumulate");  end
    if (n_hold == 0)  begin failures++; $display("FAIL no hold cycle");  end
    if (n_wrap == 0)  begin failures++; $display("FAIL no wrap-around"); end
    if (n_reset < 2)  begin failures++; $display("FAIL reset missing");  end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
