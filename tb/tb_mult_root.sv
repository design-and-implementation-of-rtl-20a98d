// tb_mult_root: checks the middle-tier root: product must equal the sum of
// its four inputs modulo 2^64.
module tb_mult_root;
  localparam int W = 64;
  logic [W-1:0] t3_s, t3_c, t1_s, t1_c, product;
  int checks = 0, failures = 0;

  mult_root #(.WIDTH(W)) dut (.t3_s(t3_s), .t3_c(t3_c), .t1_s(t1_s), .t1_c(t1_c), .product(product));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] e;
    #1;
    e = t3_s + t3_c + t1_s + t1_c;
    checks++;
    if (product !== e) begin failures++; $display("FAIL got %h exp %h", product, e); end
  endtask

  initial begin
    t3_s = '1; t3_c = 1; t1_s = 0; t1_c = 0; check();
    t3_s = '1; t3_c = '1; t1_s = '1; t1_c = '1; check();
    repeat (500) begin
      t3_s = {$urandom, $urandom}; t3_c = {$urandom, $urandom};
      t1_s = {$urandom, $urandom}; t1_c = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
