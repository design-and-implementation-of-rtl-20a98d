// tb_test_if: checks the serial test interface at its default size
// (8 lanes, 104-bit operand register, 136-bit result register).
// Loads random operand words serially (13 clocks) and compares the parallel
// operand register; captures a random result word and compares what comes out
// of the 8 serial outputs over 17 clocks. Also checks that reset clears both
// registers and that capture wins over shift.
module tb_test_if;
  localparam int L = 8, IB = 104, OB = 136, ID = IB / L, OD = OB / L;
  logic clk = 0, rst_n, shift_en, capture;
  logic [L-1:0]  sin, sout;
  logic [IB-1:0] operands, want_op;
  logic [OB-1:0] results, got_res;
  int checks = 0, failures = 0, cycles = 0;

  test_if #(.LANES(L), .IN_BITS(IB), .OUT_BITS(OB)) dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .capture(capture),
    .sin(sin), .sout(sout), .operands(operands), .results(results));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; shift_en = 0; capture = 0; sin = '0; results = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (operands !== '0 || sout !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    repeat (20) begin
      int start;
      want_op = {$urandom, $urandom, $urandom, $urandom};
      // shift in: lane k receives its MSB first
      start = cycles;
      shift_en = 1;
      for (int s = ID - 1; s >= 0; s--) begin
        for (int k = 0; k < L; k++) sin[k] = want_op[k*ID + s];
        @(posedge clk); #1;
      end
      shift_en = 0;
      checks++;
      if (operands !== want_op) begin failures++; $display("FAIL operands %h exp %h", operands, want_op); end
      checks++;
      if (cycles - start != ID) begin failures++; $display("FAIL load took %0d cycles", cycles - start); end
      // capture (with shift_en also high: capture must win) and shift out
      results = {$urandom, $urandom, $urandom, $urandom, $urandom};
      capture = 1; shift_en = 1;
      @(posedge clk); #1;
      capture = 0;
      for (int s = OD - 1; s >= 0; s--) begin
        for (int k = 0; k < L; k++) got_res[k*OD + s] = sout[k];
        @(posedge clk); #1;
      end
      shift_en = 0;
      checks++;
      if (got_res !== results) begin failures++; $display("FAIL results %h exp %h", got_res, results); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
