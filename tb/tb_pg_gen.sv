// tb_pg_gen: checks the level-0 generate/propagate units.
// For random and corner operands, every bit must satisfy 2*g + p = a + b
// (the arithmetic meaning of generate/propagate) and never g = p = 1.
module tb_pg_gen;
  import arith3d_pkg::*;
  localparam int W = 36;
  logic [W-1:0] a, b;
  gp_t gp [W];
  int checks = 0, failures = 0;

  pg_gen #(.WIDTH(W)) dut (.a(a), .b(b), .gp(gp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < W; i++) begin
      int expect_sum = int'(a[i]) + int'(b[i]);
      checks++;
      if (2 * int'(gp[i].g) + int'(gp[i].p) != expect_sum || (gp[i].g & gp[i].p)) begin
        failures++;
        $display("FAIL bit %0d a=%b b=%b g=%b p=%b", i, a[i], b[i], gp[i].g, gp[i].p);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; #1 check_all();
    a = '1; b = '1; #1 check_all();
    a = '1; b = '0; #1 check_all();
    repeat (200) begin
      a = {$urandom, $urandom} ; b = {$urandom, $urandom};
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
