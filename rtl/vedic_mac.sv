// vedic_mac: N-bit multiply-accumulate unit built from a Vedic multiplier
// and square-root carry-select adders.
//
// Each enabled clock cycle the unit multiplies the unsigned operands a and
// b in an NxN Vedic multiplier (vedic_mult, whose internal adders are all
// SQRT CSLAs) and adds the 2N-bit product to the accumulator in an ACC_W-bit
// SQRT CSLA. With clr high the accumulator is not added in, so the cycle
// loads a*b and starts a new sum. The accumulator wraps modulo 2^ACC_W; the
// accumulation adder's carry out of the last update is given as acc_cout.
//
// The published design gives the 64-bit size and the pairing of the Vedic
// multiplier with the SQRT CSLA. The accumulator register, its width
// (2N by default), the clear, enable and asynchronous active-low reset, and
// the carry flag are this design's choices.
//
// Interface:
//   clk, rst_n   clock, asynchronous active-low reset (clears acc, acc_cout)
//   en           update the accumulator this cycle
//   clr          with en: acc <= a*b instead of acc + a*b
//   a, b         N-bit unsigned operands
//   acc          ACC_W-bit accumulator (registered)
//   acc_cout     carry out of the accumulation adder at the last update
// Timing: one multiply-accumulate per cycle; acc shows the result one clock
// edge after a, b are presented with en high. Multiplier and adder are one
// combinational path between the operand ports and the accumulator register.
module vedic_mac #(
  parameter int unsigned N     = 64,
  parameter int unsigned ACC_W = 2 * N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [ACC_W-1:0] acc,
  output logic             acc_cout
);
  if (ACC_W < 2 * N) begin : g_bad_acc
    $error("vedic_mac: ACC_W must be at least 2*N");
  end

  logic [2*N-1:0]   prod;
  logic [ACC_W-1:0] prod_ext, acc_in, acc_next;
  logic             cout_next;

  vedic_mult #(.N(N)) u_mult (.a(a), .b(b), .p(prod));

  assign prod_ext = ACC_W'(prod);
  assign acc_in   = clr ? '0 : acc;

  sqrt_csla #(.WIDTH(ACC_W)) u_acc_add (
    .a(acc_in), .b(prod_ext), .cin(1'b0), .sum(acc_next), .cout(cout_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      acc_cout <= 1'b0;
    end else if (en) begin
      acc      <= acc_next;
      acc_cout <= cout_next;
    end
  end
endmodule
