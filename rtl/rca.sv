// rca: WIDTH-bit ripple carry adder.
//
// A chain of full adders in which each stage takes the carry of the stage
// below; each stage computes sum = a ^ b ^ c and carry = majority(a, b, c).
// It is the first (least significant) group of the square-root carry-select
// adder, where it is 2 bits wide.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: combinational; the carry crosses all WIDTH stages in sequence.
// The default width of 2 is the first group of the carry-select adder.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];
endmodule
