// ks_prefix: Kogge-Stone parallel prefix tree over N (g,p) elements.
//
// Level k (k = 1..LEVELS) merges element j with element j - 2^(k-1); elements
// with j < 2^(k-1) are simply buffered (the hollow triangles of the prefix
// graph). After LEVELS = ceil(log2 N) levels gp_out[j] is the group term of
// elements j..0. In the 3D adder one instance runs on each tier over that
// tier's level-1 outputs; the multiplier's final adder uses one as well.
//
// Combinational, LEVELS carry-merge delays. Interface: gp_in[N], gp_out[N].
// Structure is the standard Kogge-Stone graph.
module ks_prefix
  import arith3d_pkg::*;
#(
  parameter int unsigned N = 12
) (
  input  gp_t gp_in  [N],
  output gp_t gp_out [N]
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // lvl[k] holds the node outputs after level k; lvl[0] is the input.
  gp_t lvl [LEVELS+1][N];

  always_comb begin
    for (int j = 0; j < N; j++) lvl[0][j] = gp_in[j];
    for (int k = 1; k <= LEVELS; k++) begin
      for (int j = 0; j < N; j++) begin
        if (j >= (1 << (k-1)))
          lvl[k][j] = gp_merge(lvl[k-1][j], lvl[k-1][j - (1 << (k-1))]);
        else
          lvl[k][j] = lvl[k-1][j];
      end
    end
    for (int j = 0; j < N; j++) gp_out[j] = lvl[LEVELS][j];
  end

endmodule
