// tb_ks3d_adder: checks the 3D Kogge-Stone adder at the three widths that
// were compared (12, 36, 72 bits) in both modes.
//   full mode : {cout, sum} must equal a + b
//   split mode: for each tier t the bits at positions 3j+t form independent
//               operands; their sum and carry out must appear at the same
//               positions of `sum` and in sub_cout[t].
// Operands are random plus carry-chain corner cases (all ones + 1).
module tb_ks3d_adder;
  localparam int MAXW = 72;
  localparam int WS [3] = '{12, 36, 72};

  logic [MAXW-1:0] a, b;
  logic            split;
  logic [MAXW-1:0] sum [3];
  logic            cout [3];
  logic [2:0]      sub_cout [3];
  int checks = 0, failures = 0;
  int n_full = 0, n_split = 0;

  for (genvar d = 0; d < 3; d++) begin : g_dut
    localparam int W = WS[d];
    logic [W-1:0] s;
    ks3d_adder #(.WIDTH(W)) dut (
      .a(a[W-1:0]), .b(b[W-1:0]), .split(split),
      .sum(s), .cout(cout[d]), .sub_cout(sub_cout[d])
    );
    assign sum[d] = MAXW'(s);
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_width(int d);
    int w = WS[d];
    int m = w / 3;
    logic [MAXW:0] full, mask, got;
    if (!split) begin
      mask = (73'd1 << w) - 1;
      full = ({1'b0, a} & mask) + ({1'b0, b} & mask);
      got  = ({1'b0, sum[d]} & mask) | (73'(cout[d]) << w);
      checks++;
      if (got !== full) begin
        failures++;
        $display("FAIL full W=%0d a=%h b=%h got %h exp %h", w, a, b, got, full);
      end
      n_full++;
    end else begin
      for (int t = 0; t < 3; t++) begin
        logic [MAXW:0] sa, sb, ss;
        logic [MAXW:0] got;
        sa = '0; sb = '0; got = '0;
        for (int j = 0; j < m; j++) begin
          sa[j] = a[3*j+t]; sb[j] = b[3*j+t]; got[j] = sum[d][3*j+t];
        end
        got[m] = sub_cout[d][t];
        ss = sa + sb;
        checks++;
        if (got !== ss) begin
          failures++;
          $display("FAIL split W=%0d tier %0d exp %h got %h", w, t, ss, got);
        end
      end
      n_split++;
    end
  endtask

  task automatic apply();
    #1;
    for (int d = 0; d < 3; d++) check_width(d);
  endtask

  initial begin
    for (int mode = 0; mode < 2; mode++) begin
      split = mode[0];
      a = '1; b = 72'd1;  apply();
      a = '1; b = '1;     apply();
      a = '0; b = '0;     apply();
      a = 72'h555555555555555555; b = 72'hAAAAAAAAAAAAAAAAAB; apply();
      repeat (400) begin
        a = {$urandom, $urandom, $urandom};
        b = {$urandom, $urandom, $urandom};
        apply();
      end
    end
    if (n_full == 0 || n_split == 0) failures++;
    $display("full-mode vectors=%0d split-mode vectors=%0d", n_full, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
