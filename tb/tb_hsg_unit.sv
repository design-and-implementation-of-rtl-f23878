// tb_hsg_unit: exhaustive check of a 4-bit half-sum generator: s0 must be the
// bitwise sum and c0 the bitwise carry of a and b. Watchdog included.
module tb_hsg_unit;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] a, b, s0, c0;

  hsg_unit #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * N)); i++) begin
      {a, b} = (2 * N)'(i);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if ({c0[k], s0[k]} !== 2'(int'(a[k]) + int'(b[k]))) begin
          failures++;
          $display("FAIL a=%b b=%b bit %0d: c0=%b s0=%b", a, b, k, c0[k], s0[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
