// chip3d_top: the prototype chip - a 3D Kogge-Stone adder and a 3D Wallace
// tree multiplier behind one serial test interface.
//
// Pins (21 signal pins): clk; four controls rst_n, shift_en, capture, split;
// LANES (8) serial inputs sin and LANES serial outputs sout.
//
// Operand register (IN_BITS = 104, 8 lanes x 13 bits), from LSB:
//   X = operands[35:0], Y = operands[71:36], Z = operands[103:72]
//   adder      : X + Y                        (ADD_WIDTH = 36)
//   multiplier : X[31:0] * Y[31:0]            (MUL_N = 32)
//                split: X[31:0]*Y[15:0] and Z*Y[31:16]
// Result register (OUT_BITS = 136, 8 lanes x 17 bits), from MSB:
//   [135:100] adder sum, [99:97] carry outs (full mode: {2'b0, cout};
//   split mode: sub-adder carry outs {t2,t1,t0}), [96:1] multiplier result
//   (full mode: {32'b0, product}; split mode: {prod_hi, prod_lo}), [0] = 0.
//
// Use: hold capture low and shift_en high for 13 clocks to load the operands,
// set split, pulse capture for one clock (the units are combinational between
// the two registers, a one-cycle path), then shift_en for 17 clocks and read
// sout. The two arithmetic units, their sizes and the shared shift registers
// follow the prototype; pin meanings and register layout are this design's
// choices.
module chip3d_top #(
  parameter int unsigned ADD_WIDTH = 36,
  parameter int unsigned MUL_N     = 32,
  parameter int unsigned LANES     = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             capture,
  input  logic             split,
  input  logic [LANES-1:0] sin,
  output logic [LANES-1:0] sout
);

  localparam int unsigned HW       = 3 * MUL_N / 2;
  localparam int unsigned IN_RAW   = 2 * ADD_WIDTH + MUL_N;
  localparam int unsigned OUT_RAW  = ADD_WIDTH + 3 + 2 * HW;
  localparam int unsigned IN_BITS  = ((IN_RAW  + LANES - 1) / LANES) * LANES;
  localparam int unsigned OUT_BITS = ((OUT_RAW + LANES - 1) / LANES) * LANES;

  initial begin
    assert (MUL_N <= ADD_WIDTH)
      else $error("chip3d_top: MUL_N must not exceed ADD_WIDTH (shared operands)");
  end

  logic [IN_BITS-1:0]   operands;
  logic [OUT_BITS-1:0]  results;
  logic [ADD_WIDTH-1:0] x_op, y_op;
  logic [MUL_N-1:0]     z_op;

  logic [ADD_WIDTH-1:0] add_sum;
  logic                 add_cout;
  logic [2:0]           add_sub_cout;
  logic [2*MUL_N-1:0]   mul_product;
  logic [HW-1:0]        mul_lo, mul_hi;
  logic [2:0]           couts;
  logic [2*HW-1:0]      mul_result;

  test_if #(.LANES(LANES), .IN_BITS(IN_BITS), .OUT_BITS(OUT_BITS)) u_test_if (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .capture(capture),
    .sin(sin), .sout(sout), .operands(operands), .results(results)
  );

  assign x_op = operands[0 +: ADD_WIDTH];
  assign y_op = operands[ADD_WIDTH +: ADD_WIDTH];
  assign z_op = operands[2*ADD_WIDTH +: MUL_N];

  ks3d_adder #(.WIDTH(ADD_WIDTH)) u_adder (
    .a(x_op), .b(y_op), .split(split),
    .sum(add_sum), .cout(add_cout), .sub_cout(add_sub_cout)
  );

  wallace3d_mult #(.N(MUL_N)) u_mult (
    .a(x_op[MUL_N-1:0]), .b(y_op[MUL_N-1:0]), .a_hi(z_op), .split(split),
    .product(mul_product), .prod_lo(mul_lo), .prod_hi(mul_hi)
  );

  assign couts      = split ? add_sub_cout : {2'b00, add_cout};
  assign mul_result = split ? {mul_hi, mul_lo} : (2*HW)'(mul_product);

  assign results = {add_sum, couts, mul_result, {(OUT_BITS - OUT_RAW){1'b0}}};

endmodule
