// counter42_row: one row of 4:2 counters (compressors).
//
// Reduces four WIDTH-bit addends to two with the same sum modulo 2^WIDTH.
// Each bit position is a 4:2 counter made of two full adders: the first adds
// x0,x1,x2 and sends its carry (cout) to the next position; the second adds
// its sum, x3 and the cout arriving from the position below. Since cout does
// not depend on the incoming cout, there is no ripple along the row.
// Outputs: s (weight 2^i) and c, already shifted to its weight (c[0] = 0).
//
// Combinational, three XOR delays. The counter's inner structure is the
// usual two-full-adder form; only the use of 4:2 counters is given.
module counter42_row #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] x1,
  input  logic [WIDTH-1:0] x2,
  input  logic [WIDTH-1:0] x3,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);

  logic [WIDTH-1:0] fa1_s, fa1_c;  // first full adder (fa1_c = horizontal cout)
  logic [WIDTH-1:0] hin;           // horizontal carry into each position

  always_comb begin
    fa1_s = x0 ^ x1 ^ x2;
    fa1_c = (x0 & x1) | (x0 & x2) | (x1 & x2);
    hin   = {fa1_c[WIDTH-2:0], 1'b0};
    s     = fa1_s ^ x3 ^ hin;
    c     = {(((fa1_s[WIDTH-2:0] & x3[WIDTH-2:0]) | (fa1_s[WIDTH-2:0] & hin[WIDTH-2:0])
              | (x3[WIDTH-2:0] & hin[WIDTH-2:0]))), 1'b0};
  end

endmodule
