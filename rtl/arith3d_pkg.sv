// arith3d_pkg: types and the carry-merge operator shared by the 3D adder,
// the Kogge-Stone prefix trees and the multiplier's final adder.
//
// A (g,p) pair describes a group of bit positions: g = the group generates a
// carry, p = the group propagates an incoming carry. Merging a higher group H
// with the adjacent lower group L gives (H.g | H.p & L.g, H.p & L.p); this is
// the "carry-merge unit" drawn as a solid triangle in the adder's prefix graph.
package arith3d_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Identity element of the merge: a group that neither generates nor kills.
  localparam gp_t GP_IDENT = '{g: 1'b0, p: 1'b1};

  // Operating mode of the reconfigurable units.
  typedef enum logic {
    MODE_FULL  = 1'b0,  // one wide adder / one full multiplier
    MODE_SPLIT = 1'b1   // independent per-tier sub-units
  } mode_e;

  // Carry-merge: hi is the more significant group, lo the adjacent lower one.
  function automatic gp_t gp_merge(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
