// csla_group: reduced-complexity carry-select group of WIDTH bits.
//
// Every bit has one half adder on a[i], b[i]. Its sum s and carry c are the
// bit's result for an incoming carry of 0. The result for an incoming carry
// of 1 is derived from them without a second adder: the sum is NOT s and the
// carry is c XOR s (equal to a | b). Two 2:1 multiplexers per bit then pick
// one pair, selected by the carry into that bit. The selected carry of bit i
// is the select of bit i+1, and the select of bit 0 is the group carry in
// (which in the SQRT CSLA is the carry out of the group below).
//
// This follows the group-2 and group-3 structures of the proposed SQRT CSLA
// (half adder, inverter, exclusive-or and two multiplexers per bit).
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: combinational. The default width of 2 is the published design's group 2.
module csla_group #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] s0, c0;  // results for carry in = 0 (half adder)
  logic [WIDTH-1:0] s1, c1;  // results for carry in = 1
  logic [WIDTH:0]   sel;     // carry into each bit, used as mux select

  assign sel[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    half_adder u_ha (.a(a[i]), .b(b[i]), .sum(s0[i]), .carry(c0[i]));
    assign s1[i]    = ~s0[i];
    assign c1[i]    = c0[i] ^ s0[i];
    assign sum[i]   = sel[i] ? s1[i] : s0[i];
    assign sel[i+1] = sel[i] ? c1[i] : c0[i];
  end

  assign cout = sel[WIDTH];
endmodule
