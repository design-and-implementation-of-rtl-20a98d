// ks3d_adder: three-tier (3D) Kogge-Stone adder.
//
// Bit i of the operands is placed on tier (i mod 3): bits 0,3,6,.. on Tier 1,
// bits 1,4,7,.. on Tier 3 and bits 2,5,8,.. on Tier 2. The adder has three
// stages:
//   level 0  pg_gen            bit generate/propagate terms
//   level 1  cross_tier_merge  node i merges bits i+2..i, which sit on the
//                              three tiers (length-3 carry chain); the only
//                              cross-tier signals of the adder
//   level 2+ ks_prefix x 3     one independent Kogge-Stone tree per tier, over
//                              that tier's WIDTH/3 level-1 outputs
// Each level-1 output covers three consecutive bits, so a tree with stride one
// inside a tier (stride three in bit positions) gives node i the group term of
// bits i+2..0. The carry into bit k >= 3 is therefore node k-3, on the same
// tier as bit k, and sum[k] = p[k] ^ G(node k-3) needs no cross-tier signal.
// Carries into bits 1 and 2 come from level 1 (carry_low); cout = G of node
// WIDTH-3 (bits WIDTH-1..0).
//
// split = 1 turns the unit into three independent WIDTH/3-bit adders: sub-adder
// t adds the bits at positions 3j+t (j = 0..WIDTH/3-1). Level 1 then passes
// each bit through unmerged, so the tier trees compute each sub-adder's own
// prefixes and the same sum equation applies; sub_cout[t] is the carry out of
// sub-adder t. In full mode cout is the carry out and sub_cout[2:1] have no
// meaning (sub_cout[0] equals cout).
//
// Combinational; 2 + ceil(log2(WIDTH/3)) merge levels after level 0.
// WIDTH must be a multiple of 3 (36 for the prototype; 12, 36 and 72 were
// compared). The tier assignment, the stage structure and the split option
// follow the described architecture; the absence of a carry-in and the way
// split gates the cross-tier inputs are this design's choices.
module ks3d_adder
  import arith3d_pkg::*;
#(
  parameter int unsigned WIDTH = 36
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             split,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [2:0]       sub_cout
);

  localparam int unsigned M = WIDTH / 3;  // bits per tier

  initial begin
    assert (WIDTH % 3 == 0 && WIDTH >= 3)
      else $error("ks3d_adder: WIDTH (%0d) must be a positive multiple of 3", WIDTH);
  end

  gp_t        bit_gp [WIDTH];  // level 0
  gp_t        l1_gp  [WIDTH];  // level 1: group of bits i+2..i (full mode)
  gp_t        pre_gp [WIDTH];  // after the tier trees: bits i+2..0 (full mode)
  logic [1:0] carry_low;       // carries into bits 1 and 2

  pg_gen #(.WIDTH(WIDTH)) u_level0 (.a(a), .b(b), .gp(bit_gp));

  cross_tier_merge #(.WIDTH(WIDTH)) u_level1 (
    .gp_in(bit_gp), .split(split), .gp_out(l1_gp), .carry_low(carry_low)
  );

  // One independent Kogge-Stone sub-adder per tier (index t = bit position mod
  // 3: t = 0 is Tier 1, t = 1 Tier 3, t = 2 Tier 2). Each tier also forms the
  // sum bits it owns.
  for (genvar t = 0; t < 3; t++) begin : g_tier
    gp_t tin  [M];
    gp_t tout [M];
    for (genvar j = 0; j < M; j++) begin : g_map
      assign tin[j]          = l1_gp[3*j + t];
      assign pre_gp[3*j + t] = tout[j];
    end
    ks_prefix #(.N(M)) u_tree (.gp_in(tin), .gp_out(tout));
    assign sub_cout[t] = tout[M-1].g;
  end

  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      logic carry_in;
      if (k >= 3)      carry_in = pre_gp[(k >= 3) ? k-3 : 0].g;
      else if (k == 0) carry_in = 1'b0;
      else             carry_in = carry_low[k-1];
      sum[k] = bit_gp[k].p ^ carry_in;
    end
    cout = pre_gp[WIDTH-3].g;
  end

endmodule
