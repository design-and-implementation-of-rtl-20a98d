// tb_chip3d_top: end-to-end test of the prototype chip at its default sizes
// (36-bit 3D adder, 32x32 3D multiplier, 8+8 serial pins).
// Every operation goes through the pins only: 13 clocks of shifting operands
// in, one capture clock, 17 clocks of shifting results out (31 clocks, also
// checked). Each result is compared with a + b and a * b computed here.
// Mechanisms that must each occur at least once: full-width add, add with a
// carry out, three-way split add, split add with a sub-adder carry out, full
// multiply, split (two half) multiply.
module tb_chip3d_top;
  localparam int L = 8, AW = 36, MN = 32, HW = 48;
  localparam int IB = 104, OB = 136, ID = IB / L, OD = OB / L;

  logic clk = 0, rst_n, shift_en, capture, split;
  logic [L-1:0] sin, sout;
  int checks = 0, failures = 0, cycles = 0;
  int n_add_full = 0, n_add_cout = 0, n_add_split = 0, n_sub_cout = 0;
  int n_mul_full = 0, n_mul_split = 0;

  chip3d_top dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .capture(capture),
                  .split(split), .sin(sin), .sout(sout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_op(input logic [AW-1:0] x, input logic [AW-1:0] y,
                        input logic [MN-1:0] z, input logic md);
    logic [IB-1:0] op;
    logic [OB-1:0] res;
    logic [AW-1:0] sum;
    logic [2:0]    couts;
    logic [2*HW-1:0] mres;
    int start;
    op = {z, y, x};
    split = md;
    start = cycles;
    shift_en = 1;
    for (int s = ID - 1; s >= 0; s--) begin
      for (int k = 0; k < L; k++) sin[k] = op[k*ID + s];
      @(posedge clk); #1;
    end
    shift_en = 0; capture = 1;
    @(posedge clk); #1;
    capture = 0; shift_en = 1;
    for (int s = OD - 1; s >= 0; s--) begin
      for (int k = 0; k < L; k++) res[k*OD + s] = sout[k];
      @(posedge clk); #1;
    end
    shift_en = 0;
    checks++;
    if (cycles - start != ID + 1 + OD) begin
      failures++; $display("FAIL operation took %0d cycles", cycles - start);
    end
    sum   = res[OB-1 -: AW];
    couts = res[OB-1-AW -: 3];
    mres  = res[OB-1-AW-3 -: 2*HW];
    if (!md) begin
      logic [AW:0] es; logic [63:0] ep;
      es = {1'b0, x} + {1'b0, y};
      ep = 64'(x[MN-1:0]) * 64'(y[MN-1:0]);
      checks++;
      if ({couts, sum} !== {2'b00, es}) begin
        failures++; $display("FAIL add %h+%h got %b %h", x, y, couts, sum);
      end
      checks++;
      if (mres !== {32'b0, ep}) begin
        failures++; $display("FAIL mul %h*%h got %h exp %h", x[MN-1:0], y[MN-1:0], mres, ep);
      end
      n_add_full++; n_mul_full++;
      if (es[AW]) n_add_cout++;
    end else begin
      logic [63:0] elo, ehi;
      for (int t = 0; t < 3; t++) begin
        logic [12:0] sa, sb, ss, got;
        sa = '0; sb = '0; got = '0;
        for (int j = 0; j < AW / 3; j++) begin
          sa[j] = x[3*j+t]; sb[j] = y[3*j+t]; got[j] = sum[3*j+t];
        end
        got[12] = couts[t];
        ss = sa + sb;
        checks++;
        if (got !== ss) begin failures++; $display("FAIL split add tier %0d", t); end
        if (ss[12]) n_sub_cout++;
      end
      elo = 64'(x[MN-1:0]) * 64'(y[15:0]);
      ehi = 64'(z) * 64'(y[31:16]);
      checks++;
      if (mres !== {ehi[HW-1:0], elo[HW-1:0]}) begin
        failures++; $display("FAIL split mul got %h", mres);
      end
      n_add_split++; n_mul_split++;
    end
  endtask

  initial begin
    rst_n = 0; shift_en = 0; capture = 0; split = 0; sin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_op('1, 36'd1, '0, 1'b0);
    run_op('1, '1, '1, 1'b1);
    run_op('1, '1, '1, 1'b0);
    for (int i = 0; i < 60; i++)
      run_op({$urandom, $urandom}, {$urandom, $urandom}, $urandom, i[0]);
    $display("add_full=%0d add_cout=%0d add_split=%0d sub_cout=%0d mul_full=%0d mul_split=%0d",
             n_add_full, n_add_cout, n_add_split, n_sub_cout, n_mul_full, n_mul_split);
    if (n_add_full == 0)  begin failures++; $display("FAIL never: full add");  end
    if (n_add_cout == 0)  begin failures++; $display("FAIL never: add carry out"); end
    if (n_add_split == 0) begin failures++; $display("FAIL never: split add"); end
    if (n_sub_cout == 0)  begin failures++; $display("FAIL never: sub-adder carry out"); end
    if (n_mul_full == 0)  begin failures++; $display("FAIL never: full multiply"); end
    if (n_mul_split == 0) begin failures++; $display("FAIL never: split multiply"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
