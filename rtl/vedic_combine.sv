// vedic_combine: one node of the Vedic multiplier tree. It forms the 2N-bit
// product of two N-bit operands from the four (N/2)x(N/2) products of their
// halves, using three N-bit square-root carry-select adders.
//
// With H = N/2 and operands a = {aH, aL}, b = {bH, bL}:
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (inputs, N bits each)
//   adder 1:  {c1, m1} = q1 + q2
//   adder 2:  {c2, m2} = m1 + q0[N-1:H]
//   adder 3:  hi       = q3 + {c1|c2, m2[N-1:H]}
//   p = {hi, m2[H-1:0], q0[H-1:0]}
// This is the published design's arrangement of the 4x4, 8x8 and 16x16 Vedic
// multipliers (the low half of q0 passes straight to the product, adder 1
// sums the crosswise products, adder 2 adds the high half of q0, adder 3 adds
// q3 and the carry), with the proposed SQRT CSLA in place of each ripple
// carry adder.
//
// The carries c1 and c2 both weigh 2^(N+H). They are never both 1 because
// q1 + q2 + q0[N-1:H] < 2^(N+1), so their OR is their sum; feeding that one
// bit to adder 3 is this design's choice, and an assertion checks the
// claim in simulation. The carry out of adder 3 is always
// 0 (the product fits in 2N bits) and is left unused.
//
// Interface: q0..q3 (N bits) -> p (2N bits). N even, >= 4.
// Timing: combinational. The default N = 16 is the published design's 16-bit node.
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] m1, m2, hi;
  logic         c1, c2, c3;

  sqrt_csla #(.WIDTH(N)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(m1), .cout(c1)
  );
  sqrt_csla #(.WIDTH(N)) u_add2 (
    .a(m1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0), .sum(m2), .cout(c2)
  );
  sqrt_csla #(.WIDTH(N)) u_add3 (
    .a(q3), .b({{(H-1){1'b0}}, c1 | c2, m2[N-1:H]}), .cin(1'b0),
    .sum(hi), .cout(c3)
  );

  assign p = {hi, m2[H-1:0], q0[H-1:0]};

  // The OR above is only a sum because the two carries exclude each other.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_combine: c1 and c2 both set");
  end
endmodule
