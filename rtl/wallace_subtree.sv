// wallace_subtree: the part of the Wallace tree placed on one outer tier.
//
// ROWS addends (a contiguous half of the partial-product rows) are reduced to
// two by levels of 4:2 counter rows: level 1 turns ROWS rows into ROWS/2, level
// 2 into ROWS/4, and so on down to two rows. For the 32x32 multiplier each of
// the two sub-trees (Tier 3 and Tier 1) has levels 1-3 (16 -> 8 -> 4 -> 2); the
// final level sits on the middle tier (mult_root). Only these two outputs
// cross to the middle tier.
//
// Combinational, log2(ROWS)-1 counter levels. Interface: rows[ROWS] in,
// sum_row and carry_row out (sum of outputs = sum of inputs mod 2^WIDTH).
// ROWS must be a power of two and at least 4. Grouping consecutive rows into
// each counter is this design's choice.
module wallace_subtree #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] rows [ROWS],
  output logic [WIDTH-1:0] sum_row,
  output logic [WIDTH-1:0] carry_row
);

  localparam int unsigned LEVELS = $clog2(ROWS) - 1;

  initial begin
    assert (ROWS >= 4 && (ROWS & (ROWS - 1)) == 0)
      else $error("wallace_subtree: ROWS (%0d) must be a power of two >= 4", ROWS);
  end

  // Each level k is its own generate scope: in_r holds the ROWS >> (k-1) rows
  // entering the level, out_r the ROWS >> k rows leaving it.
  for (genvar k = 1; k <= LEVELS; k++) begin : g_level
    localparam int unsigned NIN = ROWS >> (k - 1);
    logic [WIDTH-1:0] in_r  [NIN];
    logic [WIDTH-1:0] out_r [NIN/2];
    if (k == 1) begin : g_first
      assign in_r = rows;
    end else begin : g_next
      assign in_r = g_level[k-1].out_r;
    end
    for (genvar g = 0; g < NIN / 4; g++) begin : g_ctr
      counter42_row #(.WIDTH(WIDTH)) u_c42 (
        .x0(in_r[4*g]),   .x1(in_r[4*g+1]),
        .x2(in_r[4*g+2]), .x3(in_r[4*g+3]),
        .s (out_r[2*g]),  .c (out_r[2*g+1])
      );
    end
  end

  assign sum_row   = g_level[LEVELS].out_r[0];
  assign carry_row = g_level[LEVELS].out_r[1];

endmodule
