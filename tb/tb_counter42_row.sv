// tb_counter42_row: checks a 64-bit row of 4:2 counters: s + c must equal
// x0 + x1 + x2 + x3 modulo 2^64, and c[0] must be 0 (carries are weighted).
module tb_counter42_row;
  localparam int W = 64;
  logic [W-1:0] x0, x1, x2, x3, s, c;
  int checks = 0, failures = 0;

  counter42_row #(.WIDTH(W)) dut (.x0(x0), .x1(x1), .x2(x2), .x3(x3), .s(s), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] e;
    #1;
    e = x0 + x1 + x2 + x3;
    checks++;
    if (W'(s + c) !== e || c[0] !== 1'b0) begin
      failures++;
      $display("FAIL %h %h %h %h -> s=%h c=%h exp %h", x0, x1, x2, x3, s, c, e);
    end
  endtask

  initial begin
    x0 = '1; x1 = '1; x2 = '1; x3 = '1; check();
    x0 = '0; x1 = '0; x2 = '0; x3 = '0; check();
    x0 = '1; x1 = 1;  x2 = 0;  x3 = '1; check();
    repeat (500) begin
      x0 = {$urandom, $urandom}; x1 = {$urandom, $urandom};
      x2 = {$urandom, $urandom}; x3 = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
