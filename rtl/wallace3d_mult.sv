// wallace3d_mult: N x N unsigned Wallace tree multiplier partitioned over
// three tiers.
//
// The N partial-product rows (row i = b[i] ? a << i : 0, 2N bits) are split in
// two halves. Rows 0..N/2-1 are reduced to two addends by a sub-tree on Tier 1,
// rows N/2..N-1 by a sub-tree on Tier 3 (wallace_subtree, all levels but the
// last). The middle tier (mult_root) holds the last level of 4:2 counters and
// the PPA that forms product = a * b. Only the four sub-tree outputs cross
// tiers, replacing the long wires of a flat layout.
//
// Each outer tier also has its own 3N/2-bit adder on its two addends, so the
// unit can be used as two independent N x N/2 multipliers:
//   prod_lo = a * b[N/2-1:0]                      (Tier 1)
//   prod_hi = (split ? a_hi : a) * b[N-1:N/2]     (Tier 3)
// With split = 1 the Tier-3 rows use the second multiplicand a_hi and
// `product` has no meaning; with split = 0 `product` is a*b.
//
// Combinational. N must be a power of two, at least 8 (32 for the prototype).
// The partition, the 4:2 counters and the per-tier adders follow the described
// architecture; unsigned operands, the row-to-tier assignment and the a_hi
// operand of the second half multiplier are this design's choices.
module wallace3d_mult
  import arith3d_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  input  logic [N-1:0]       a_hi,
  input  logic               split,
  output logic [2*N-1:0]     product,
  output logic [3*N/2-1:0]   prod_lo,
  output logic [3*N/2-1:0]   prod_hi
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned HALF = N / 2;
  localparam int unsigned HW   = 3 * N / 2;

  logic [N-1:0]   a_t3;                 // multiplicand seen by Tier 3
  logic [W-1:0]   rows_t1 [HALF];
  logic [W-1:0]   rows_t3 [HALF];
  logic [W-1:0]   t1_s, t1_c, t3_s, t3_c;
  logic [HW-1:0]  hi_s, hi_c;
  logic           lo_cout, hi_cout;

  assign a_t3 = (mode_e'(split) == MODE_SPLIT) ? a_hi : a;

  // Partial-product array (AND gates), split between the outer tiers.
  always_comb begin
    for (int i = 0; i < HALF; i++) begin
      rows_t1[i] = b[i]        ? (W'(a)    << i)          : '0;
      rows_t3[i] = b[HALF + i] ? (W'(a_t3) << (HALF + i)) : '0;
    end
  end

  wallace_subtree #(.ROWS(HALF), .WIDTH(W)) u_tier1_tree (
    .rows(rows_t1), .sum_row(t1_s), .carry_row(t1_c)
  );
  wallace_subtree #(.ROWS(HALF), .WIDTH(W)) u_tier3_tree (
    .rows(rows_t3), .sum_row(t3_s), .carry_row(t3_c)
  );

  mult_root #(.WIDTH(W)) u_tier2_root (
    .t3_s(t3_s), .t3_c(t3_c), .t1_s(t1_s), .t1_c(t1_c), .product(product)
  );

  // Separate adders on the outer tiers for the half multipliers. Tier-3 rows
  // are all zero below bit HALF, so their sum is taken from bit HALF upward.
  assign hi_s = t3_s[W-1:HALF];
  assign hi_c = t3_c[W-1:HALF];

  ks_adder #(.WIDTH(HW)) u_tier1_adder (
    .a(t1_s[HW-1:0]), .b(t1_c[HW-1:0]), .sum(prod_lo), .cout(lo_cout)
  );
  ks_adder #(.WIDTH(HW)) u_tier3_adder (
    .a(hi_s), .b(hi_c), .sum(prod_hi), .cout(hi_cout)
  );

endmodule
