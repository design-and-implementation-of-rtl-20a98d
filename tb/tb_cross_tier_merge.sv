// tb_cross_tier_merge: checks level 1 of the 3D adder.
// Reference: the group generate of bits min(i+2,W-1)..i (..0 for nodes 1
// and 2) is computed by
// rippling a carry bit by bit, the group propagate as the AND of the bit
// propagates; carry_low must be the carries into bits 1 and 2. In split mode
// every output must equal its own input and carry_low must be 0.
module tb_cross_tier_merge;
  import arith3d_pkg::*;
  localparam int W = 36;
  gp_t  gin [W];
  gp_t  gout [W];
  logic split;
  logic [1:0] carry_low;
  int checks = 0, failures = 0;

  cross_tier_merge #(.WIDTH(W)) dut (.gp_in(gin), .split(split), .gp_out(gout), .carry_low(carry_low));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < W; i++) begin
      logic c, p;
      int hi = split ? i : ((i + 2 < W) ? i + 2 : W - 1);
      int lo = (!split && (i == 1 || i == 2)) ? 0 : i;
      c = 1'b0; p = 1'b1;
      for (int k = lo; k <= hi; k++) begin
        c = gin[k].g | (gin[k].p & c);
        p = p & gin[k].p;
      end
      checks++;
      if (gout[i].g !== c || gout[i].p !== p) begin
        failures++;
        $display("FAIL split=%0d bit %0d got g=%b p=%b exp g=%b p=%b", split, i,
                 gout[i].g, gout[i].p, c, p);
      end
    end
    begin
      logic [1:0] exp_low;
      exp_low[0] = split ? 1'b0 : gin[0].g;
      exp_low[1] = split ? 1'b0 : (gin[1].g | (gin[1].p & gin[0].g));
      checks++;
      if (carry_low !== exp_low) begin
        failures++;
        $display("FAIL split=%0d carry_low=%b exp %b", split, carry_low, exp_low);
      end
    end
  endtask

  initial begin
    for (int rep = 0; rep < 300; rep++) begin
      split = rep[0];
      for (int i = 0; i < W; i++) begin
        // legal (g,p) codes from bit pairs: (0,0) kill, (0,1) propagate, (1,0) generate
        case ($urandom_range(2))
          0: gin[i] = '{g: 1'b0, p: 1'b0};
          1: gin[i] = '{g: 1'b0, p: 1'b1};
          default: gin[i] = '{g: 1'b1, p: 1'b0};
        endcase
      end
      #1 check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
