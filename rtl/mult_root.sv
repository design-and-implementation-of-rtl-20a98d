// mult_root: the middle-tier root of the 3D Wallace tree multiplier.
//
// The two addends from the Tier 3 sub-tree and the two from the Tier 1
// sub-tree (the signals that cross tiers) enter the last level of 4:2
// counters, and the resulting two rows are added by a parallel prefix adder
// (Kogge-Stone) to give the product.
//
// Combinational. Interface: t3_s, t3_c, t1_s, t1_c (WIDTH bits) -> product
// (their sum modulo 2^WIDTH). Level and PPA placement follow the described
// partition; the PPA type is this design's choice.
module mult_root #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] t3_s,
  input  logic [WIDTH-1:0] t3_c,
  input  logic [WIDTH-1:0] t1_s,
  input  logic [WIDTH-1:0] t1_c,
  output logic [WIDTH-1:0] product
);

  logic [WIDTH-1:0] last_s, last_c;
  logic             unused_cout;

  counter42_row #(.WIDTH(WIDTH)) u_last_level (
    .x0(t3_s), .x1(t3_c), .x2(t1_s), .x3(t1_c), .s(last_s), .c(last_c)
  );

  ks_adder #(.WIDTH(WIDTH)) u_ppa (
    .a(last_s), .b(last_c), .sum(product), .cout(unused_cout)
  );

endmodule
