// sqrt_csla: WIDTH-bit square-root carry-select adder with reduced-complexity
// groups.
//
// The operands are cut into groups whose sizes grow by one bit: a 2-bit
// ripple carry adder (bits [1:0]) takes the external carry in, and each
// following group is a csla_group of 2, 3, 4, 5, ... bits that takes the
// carry out of the group below. For the default 16 bits the groups are
// [1:0] [3:2] [6:4] [10:7] [15:11], as in the published design. Other widths
// continue the same sequence and truncate the last group (see mac_pkg); that
// is this design's own extension, used for the 4- to 128-bit adders of the
// Vedic multiplier and of the accumulator.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// Timing: combinational.
module sqrt_csla
  import mac_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = csla_num_groups(WIDTH);

  logic [NG:0] c;  // c[g] is the carry into group g

  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = csla_group_start(g);
    localparam int unsigned GW = csla_group_size(g, WIDTH);
    if (g == 0) begin : g_rca
      rca #(.WIDTH(GW)) u_rca (
        .a(a[LO +: GW]), .b(b[LO +: GW]), .cin(c[g]),
        .sum(sum[LO +: GW]), .cout(c[g+1])
      );
    end else begin : g_sel
      csla_group #(.WIDTH(GW)) u_grp (
        .a(a[LO +: GW]), .b(b[LO +: GW]), .cin(c[g]),
        .sum(sum[LO +: GW]), .cout(c[g+1])
      );
    end
  end

  assign cout = c[NG];
endmodule
