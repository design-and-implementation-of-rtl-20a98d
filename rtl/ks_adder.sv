// ks_adder: two-dimensional Kogge-Stone adder (no carry-in).
//
// pg_gen forms bit generate/propagate terms, ks_prefix turns them into
// prefix carries, and sum[i] = p[i] ^ carry-into-bit-i. It is the parallel
// prefix adder (PPA) that turns the multiplier's last two addends into the
// product, and the separate adders that let the outer tiers of the
// multiplier work as independent half multipliers.
//
// Combinational, ceil(log2 WIDTH)+2 logic levels. Interface: a, b -> sum,
// cout (carry out of the top bit). Choosing Kogge-Stone for the PPA is this
// design's choice; the multiplier description only asks for a PPA.
module ks_adder
  import arith3d_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  gp_t bit_gp [WIDTH];
  gp_t pre_gp [WIDTH];

  pg_gen #(.WIDTH(WIDTH)) u_pg (.a(a), .b(b), .gp(bit_gp));
  ks_prefix #(.N(WIDTH)) u_tree (.gp_in(bit_gp), .gp_out(pre_gp));

  always_comb begin
    sum[0] = bit_gp[0].p;
    for (int i = 1; i < WIDTH; i++) sum[i] = bit_gp[i].p ^ pre_gp[i-1].g;
    cout = pre_gp[WIDTH-1].g;
  end

endmodule
