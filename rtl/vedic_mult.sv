// vedic_mult: NxN unsigned Vedic (Urdhva-Tiryakbhyam) multiplier.
//
// An NxN Vedic multiplier is four (N/2)x(N/2) Vedic multipliers whose
// products are merged by three N-bit adders (vedic_combine); the
// decomposition repeats down to 2x2 multipliers (vedic_2x2). For N = 64
// that is 64 <- 32 <- 16 <- 8 <- 4 <- 2, as the published design describes for 16
// bits (16 <- 8 <- 4 <- 2). The tree is written out level by level here
// instead of as a self-instantiating module:
//   level 1: (N/2)^2 2x2 products, pp(i,j) = a[2i+:2] * b[2j+:2]
//   level k: product (i,j) of 2^k-bit chunks i of a and j of b, merged from
//            the level k-1 products (2i,2j), (2i+1,2j), (2i,2j+1), (2i+1,2j+1)
//            as q0, q1, q2, q3 of vedic_combine
// All products live in one packed bus pp; level k starts at
// vedic_level_base(N, k) and product (i,j) of it at (i*M + j)*2^(k+1), with
// M = N/2^k. The single product of the last level is p.
//
// Interface: a, b (N bits) -> p (2N bits). N must be a power of two, >= 2.
// Timing: combinational; log2(N)-1 levels of three adders each after the
// 2x2 leaves. The default N = 16 is the published design's 16-bit Vedic multiplier.
module vedic_mult
  import mac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned TOTAL  = vedic_level_base(N, LEVELS + 1);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mult: N must be a power of two and at least 2");
  end

  logic [TOTAL-1:0] pp;

  // Level 1: 2x2 leaves.
  for (genvar i = 0; i < N / 2; i++) begin : g_leaf_i
    for (genvar j = 0; j < N / 2; j++) begin : g_leaf_j
      vedic_2x2 u_leaf (
        .a(a[2*i +: 2]), .b(b[2*j +: 2]),
        .p(pp[(i * (N / 2) + j) * 4 +: 4])
      );
    end
  end

  // Levels 2 .. LEVELS: combine four products of the level below.
  for (genvar k = 2; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned S    = 1 << k;       // operand chunk width
    localparam int unsigned M    = N / S;        // chunks per operand
    localparam int unsigned MB   = 2 * M;        // chunks per operand below
    localparam int unsigned BASE = vedic_level_base(N, k);
    localparam int unsigned BLOW = vedic_level_base(N, k - 1);
    for (genvar i = 0; i < M; i++) begin : g_i
      for (genvar j = 0; j < M; j++) begin : g_j
        vedic_combine #(.N(S)) u_node (
          .q0(pp[BLOW + ((2*i)   * MB + 2*j)     * S +: S]),
          .q1(pp[BLOW + ((2*i+1) * MB + 2*j)     * S +: S]),
          .q2(pp[BLOW + ((2*i)   * MB + 2*j + 1) * S +: S]),
          .q3(pp[BLOW + ((2*i+1) * MB + 2*j + 1) * S +: S]),
          .p (pp[BASE + (i * M + j) * 2 * S +: 2 * S])
        );
      end
    end
  end

  assign p = pp[vedic_level_base(N, LEVELS) +: 2 * N];
endmodule
