// test_if: serial test interface shared by the adder and the multiplier.
//
// The chip is pad limited, so operands are shifted in and results shifted out
// through LANES serial pins in each direction. Two registers:
//   operands (IN_BITS)  LANES chains of IN_BITS/LANES bits; lane k is the
//                       slice operands[k*ID +: ID]. On shift_en every lane
//                       shifts one place towards its MSB and takes sin[k] in
//                       at its LSB, so the first bit shifted in ends at the MSB.
//   results (OUT_BITS)  on capture the register loads `results` in parallel;
//                       on shift_en each lane shifts towards its MSB (zeros in)
//                       and sout[k] is always the MSB of lane k.
// capture has priority over shift_en for the result register; the operand
// register ignores capture. rst_n (active low, synchronous) clears both.
//
// Timing: operands are stable one clock after the last shift; the arithmetic
// between the two registers then has one clock period until capture.
// The existence of shared shift registers and the pin count follow the
// prototype; lane layout, priority and reset are this design's choices.
module test_if #(
  parameter int unsigned LANES    = 8,
  parameter int unsigned IN_BITS  = 104,
  parameter int unsigned OUT_BITS = 136
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic                capture,
  input  logic [LANES-1:0]    sin,
  output logic [LANES-1:0]    sout,
  output logic [IN_BITS-1:0]  operands,
  input  logic [OUT_BITS-1:0] results
);

  localparam int unsigned ID = IN_BITS / LANES;
  localparam int unsigned OD = OUT_BITS / LANES;

  initial begin
    assert (IN_BITS % LANES == 0 && OUT_BITS % LANES == 0 && ID >= 2 && OD >= 2)
      else $error("test_if: register sizes must be multiples of LANES, >= 2 bits per lane");
  end

  logic [IN_BITS-1:0]  op_q;
  logic [OUT_BITS-1:0] res_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_q  <= '0;
      res_q <= '0;
    end else begin
      if (shift_en) begin
        for (int k = 0; k < LANES; k++)
          op_q[k*ID +: ID] <= {op_q[k*ID +: ID-1], sin[k]};
      end
      if (capture) begin
        res_q <= results;
      end else if (shift_en) begin
        for (int k = 0; k < LANES; k++)
          res_q[k*OD +: OD] <= {res_q[k*OD +: OD-1], 1'b0};
      end
    end
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) sout[k] = res_q[k*OD + OD - 1];
  end

  assign operands = op_q;

endmodule
