// tb_wallace_subtree: checks the outer-tier reduction tree with 16 rows (the
// 32x32 multiplier), 8 rows (the 16x16 example) and 4 rows: the two outputs
// must add up to the sum of all input rows modulo 2^64.
module tb_wallace_subtree;
  localparam int W = 64;
  logic [W-1:0] r16 [16];
  logic [W-1:0] s16, c16, s8, c8, s4, c4;
  int checks = 0, failures = 0;

  wallace_subtree #(.ROWS(16), .WIDTH(W)) dut16 (.rows(r16), .sum_row(s16), .carry_row(c16));
  wallace_subtree #(.ROWS(8),  .WIDTH(W)) dut8  (.rows(r16[0:7]), .sum_row(s8), .carry_row(c8));
  wallace_subtree #(.ROWS(4),  .WIDTH(W)) dut4  (.rows(r16[0:3]), .sum_row(s4), .carry_row(c4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] e16, e8, e4;
    #1;
    e16 = '0; e8 = '0; e4 = '0;
    for (int i = 0; i < 16; i++) e16 += r16[i];
    for (int i = 0; i < 8; i++)  e8  += r16[i];
    for (int i = 0; i < 4; i++)  e4  += r16[i];
    checks += 3;
    if (W'(s16 + c16) !== e16) begin failures++; $display("FAIL 16 rows"); end
    if (W'(s8 + c8)   !== e8)  begin failures++; $display("FAIL 8 rows");  end
    if (W'(s4 + c4)   !== e4)  begin failures++; $display("FAIL 4 rows");  end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) r16[i] = '1;
    check();
    repeat (300) begin
      for (int i = 0; i < 16; i++) r16[i] = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
