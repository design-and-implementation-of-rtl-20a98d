// tb_ks_adder: checks the 2D Kogge-Stone adder at 64 bits (the multiplier's
// final adder) and 48 bits (the half-multiplier adders) against a + b.
module tb_ks_adder;
  localparam int W1 = 64;
  localparam int W2 = 48;
  logic [W1-1:0] a1, b1, s1;  logic c1;
  logic [W2-1:0] a2, b2, s2;  logic c2;
  int checks = 0, failures = 0;

  ks_adder #(.WIDTH(W1)) dut1 (.a(a1), .b(b1), .sum(s1), .cout(c1));
  ks_adder #(.WIDTH(W2)) dut2 (.a(a2), .b(b2), .sum(s2), .cout(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W1:0] e1; logic [W2:0] e2;
    #1;
    e1 = {1'b0, a1} + {1'b0, b1};
    e2 = {1'b0, a2} + {1'b0, b2};
    checks += 2;
    if ({c1, s1} !== e1) begin failures++; $display("FAIL64 %h+%h got %h", a1, b1, {c1, s1}); end
    if ({c2, s2} !== e2) begin failures++; $display("FAIL48 %h+%h got %h", a2, b2, {c2, s2}); end
  endtask

  initial begin
    a1 = '1; b1 = 1; a2 = '1; b2 = 1; check();
    a1 = '1; b1 = '1; a2 = '1; b2 = '1; check();
    a1 = 0; b1 = 0; a2 = 0; b2 = 0; check();
    repeat (500) begin
      a1 = {$urandom, $urandom}; b1 = {$urandom, $urandom};
      a2 = W2'({$urandom, $urandom}); b2 = W2'({$urandom, $urandom});
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
