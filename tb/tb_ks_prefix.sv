// tb_ks_prefix: checks the Kogge-Stone prefix tree at N = 12 (one tier of the
// 36-bit 3D adder) and N = 7 (not a power of two). Reference: serial scan of
// the carry-merge operator from element 0 upward.
module tb_ks_prefix;
  import arith3d_pkg::*;
  localparam int N1 = 12;
  localparam int N2 = 7;
  gp_t in1 [N1], out1 [N1];
  gp_t in2 [N2], out2 [N2];
  int checks = 0, failures = 0;

  ks_prefix #(.N(N1)) dut1 (.gp_in(in1), .gp_out(out1));
  ks_prefix #(.N(N2)) dut2 (.gp_in(in2), .gp_out(out2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic gp_t rand_gp();
    gp_t r;
    case ($urandom_range(2))
      0: r = '{g: 1'b0, p: 1'b0};
      1: r = '{g: 1'b0, p: 1'b1};
      default: r = '{g: 1'b1, p: 1'b0};
    endcase
    return r;
  endfunction

  initial begin
    repeat (300) begin
      logic c, p;
      for (int j = 0; j < N1; j++) in1[j] = rand_gp();
      for (int j = 0; j < N2; j++) in2[j] = rand_gp();
      #1;
      c = 0; p = 1;
      for (int j = 0; j < N1; j++) begin
        c = in1[j].g | (in1[j].p & c); p = p & in1[j].p;
        checks++;
        if (out1[j].g !== c || out1[j].p !== p) begin
          failures++; $display("FAIL N=%0d j=%0d", N1, j);
        end
      end
      c = 0; p = 1;
      for (int j = 0; j < N2; j++) begin
        c = in2[j].g | (in2[j].p & c); p = p & in2[j].p;
        checks++;
        if (out2[j].g !== c || out2[j].p !== p) begin
          failures++; $display("FAIL N=%0d j=%0d", N2, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
