// half_adder: one-bit half adder, the basic cell of the 2x2 Vedic multiplier
// and of the reduced-complexity carry-select groups.
//
// sum = a XOR b, carry = a AND b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
