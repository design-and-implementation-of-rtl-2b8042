// vedic_2x2: 2x2-bit Vedic (Urdhva-Tiryakbhyam, "vertically and crosswise")
// multiplier, the leaf of the recursive Vedic multiplier.
//
// The vertical product a0&b0 is result bit 0. The two crosswise products
// a1&b0 and a0&b1 go into a half adder whose sum is bit 1. The second
// vertical product a1&b1 and that half adder's carry go into a second half
// adder, whose sum and carry are bits 2 and 3. This is the published design's
// structure.
//
// Interface: a, b (2 bits) -> p (4 bits), unsigned. Timing: combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic ha1_c;

  assign p[0] = a[0] & b[0];

  half_adder u_ha1 (.a(a[1] & b[0]), .b(a[0] & b[1]), .sum(p[1]), .carry(ha1_c));
  half_adder u_ha2 (.a(a[1] & b[1]), .b(ha1_c),       .sum(p[2]), .carry(p[3]));
endmodule
