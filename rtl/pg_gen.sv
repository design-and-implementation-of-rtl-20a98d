// pg_gen: level-0 function units of a prefix adder.
//
// For every bit position i it forms the initial generate g = a & b and
// propagate p = a ^ b terms (the circles on level 0 of the adder's prefix
// graph). Purely combinational, no timing of its own.
//
// Interface: a, b operands (WIDTH bits); gp[i] is the (g,p) pair of bit i.
// The g/p definitions are the standard ones; the structure follows the
// adder's level-0 description, the equations are this design's choice.
module pg_gen
  import arith3d_pkg::*;
#(
  parameter int unsigned WIDTH = 36
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output gp_t              gp [WIDTH]
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      gp[i].g = a[i] & b[i];
      gp[i].p = a[i] ^ b[i];
    end
  end

endmodule
