// cross_tier_merge: level 1 of the 3D Kogge-Stone adder, the only stage whose
// signals cross tier boundaries.
//
// Bits are interleaved over three tiers (bit i sits on tier i mod 3), so bit i
// and the two bits right above it always live on three different tiers. Node
// i forms the group term of bits i+2..i (clipped at the top bit), i.e. carry
// forwarding in this stage runs from a node towards the bits above it, the
// opposite direction of the later stages. It is built as a carry chain of
// length three instead of one arity-3 merge gate: start with bit i, merge bit
// i+1 on top, then bit i+2. This costs one logic level but keeps the TSV count
// and fanout low.
//
// Nodes 1 and 2, the lowest nodes of the tiers that start at bits 1 and 2,
// extend their chain down to bit 0 (covering bits 3..0 and 4..0), using the
// first links of node 0's chain (bits 0..0 and 1..0). After the tier trees,
// node k-3 then holds the carry into bit k >= 3, on the same tier as bit k.
// The carries into bits 1 and 2 are those first links of node 0's chain and
// are output as carry_low (carry_low[0] into bit 1, [1] into bit 2).
//
// split = 1 reconfigures the adder into three independent sub-adders: the
// cross-tier inputs are replaced by the merge identity, so gp_out[i] = gp_in[i],
// carry_low = 0, and no information crosses a tier.
//
// Combinational. Interface: gp_in[WIDTH], split -> gp_out[WIDTH], carry_low.
// The length-3 chain and the flipped direction follow the adder's design; the
// way split gates the chain is this design's own choice.
module cross_tier_merge
  import arith3d_pkg::*;
#(
  parameter int unsigned WIDTH = 36
) (
  input  gp_t        gp_in  [WIDTH],
  input  logic       split,
  output gp_t        gp_out [WIDTH],
  output logic [1:0] carry_low
);

  // Group terms of bits 0..0 and 1..0: the first links of node 0's chain.
  gp_t low0, low1;

  always_comb begin
    low0 = split ? GP_IDENT : gp_in[0];
    low1 = split ? GP_IDENT : gp_merge(gp_in[(WIDTH > 1) ? 1 : 0], gp_in[0]);
    carry_low[0] = low0.g & !split;  // carry into bit 1
    carry_low[1] = low1.g & !split;  // carry into bit 2
    for (int i = 0; i < WIDTH; i++) begin
      gp_t above1, above2, link1, link2;
      above1 = (i + 1 < WIDTH && !split) ? gp_in[(i + 1 < WIDTH) ? i+1 : i] : GP_IDENT;
      above2 = (i + 2 < WIDTH && !split) ? gp_in[(i + 2 < WIDTH) ? i+2 : i] : GP_IDENT;
      // chain link 1: bit i+1 (next tier) on top of bit i
      link1 = gp_merge(above1, gp_in[i]);
      // chain link 2: bit i+2 (third tier) on top
      link2 = gp_merge(above2, link1);
      // The lowest nodes of the tiers starting at bits 1 and 2 continue their
      // chain down to bit 0, so every tier tree starts from bit 0.
      if (i == 1)      gp_out[i] = gp_merge(link2, low0);
      else if (i == 2) gp_out[i] = gp_merge(link2, low1);
      else             gp_out[i] = link2;
    end
  end

endmodule
