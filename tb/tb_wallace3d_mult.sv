// tb_wallace3d_mult: checks the 3D Wallace tree multiplier at 32x32 (the
// prototype size) and 16x16 (the size of the architecture drawing).
//   full mode : product = a * b, prod_lo = a * b_lo, prod_hi = a * b_hi
//   split mode: prod_lo = a * b_lo, prod_hi = a_hi * b_hi (two independent
//               N x N/2 multipliers)
module tb_wallace3d_mult;
  logic [31:0] a, b, a_hi;
  logic        split;
  logic [63:0] p32;  logic [47:0] lo32, hi32;
  logic [31:0] p16;  logic [23:0] lo16, hi16;
  int checks = 0, failures = 0;
  int n_full = 0, n_split = 0;

  wallace3d_mult #(.N(32)) dut32 (.a(a), .b(b), .a_hi(a_hi), .split(split),
                                  .product(p32), .prod_lo(lo32), .prod_hi(hi32));
  wallace3d_mult #(.N(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .a_hi(a_hi[15:0]), .split(split),
                                  .product(p16), .prod_lo(lo16), .prod_hi(hi16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [63:0] e32, elo32, ehi32;
    logic [31:0] e16, elo16, ehi16;
    #1;
    e32   = 64'(a) * 64'(b);
    elo32 = 64'(a) * 64'(b[15:0]);
    ehi32 = 64'(split ? a_hi : a) * 64'(b[31:16]);
    e16   = 32'(a[15:0]) * 32'(b[15:0]);
    elo16 = 32'(a[15:0]) * 32'(b[7:0]);
    ehi16 = 32'(split ? a_hi[15:0] : a[15:0]) * 32'(b[15:8]);
    checks += 4;
    if (lo32 !== elo32[47:0] || hi32 !== ehi32[47:0]) begin
      failures++; $display("FAIL 32 halves split=%0d a=%h ahi=%h b=%h", split, a, a_hi, b);
    end
    if (lo16 !== elo16[23:0] || hi16 !== ehi16[23:0]) begin
      failures++; $display("FAIL 16 halves split=%0d", split);
    end
    if (!split) begin
      if (p32 !== e32) begin failures++; $display("FAIL 32 %h*%h got %h exp %h", a, b, p32, e32); end
      if (p16 !== e16) begin failures++; $display("FAIL 16 %h*%h got %h", a[15:0], b[15:0], p16); end
      n_full++;
    end else begin
      n_split++;
    end
  endtask

  initial begin
    for (int mode = 0; mode < 2; mode++) begin
      split = mode[0];
      a = '1; b = '1; a_hi = '1; check();
      a = '1; b = '1; a_hi = 0;  check();
      a = 0;  b = '1; a_hi = '1; check();
      a = 32'h8000_0001; b = 32'hFFFF_0001; a_hi = 32'h1234_5678; check();
      repeat (400) begin
        a = $urandom; b = $urandom; a_hi = $urandom;
        check();
      end
    end
    if (n_full == 0 || n_split == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
