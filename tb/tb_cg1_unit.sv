// tb_cg1_unit: exhaustive check of a 4-bit carry generator for input carry
// 1. For every pair of operands the testbench forms the half-sum and
// half-carry words itself and compares each full-carry bit i with the carry
// out of bit i of the integer sum a + b + 1. Watchdog included.
module tb_cg1_unit;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] a, b, s0, c0, cw;
  int unsigned low_a, low_b, ref_c;

  assign s0 = a ^ b;
  assign c0 = a & b;

  cg1_unit #(.N(N)) dut (.s0(s0), .c0(c0), .c11(cw));

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
        low_a = int'(a) & ((1 << (k + 1)) - 1);
        low_b = int'(b) & ((1 << (k + 1)) - 1);
        ref_c = ((low_a + low_b + 1) >> (k + 1)) & 1;
        checks++;
        if (cw[k] !== ref_c[0]) begin
          failures++;
          $display("FAIL a=%b b=%b carry bit %0d = %b, expected %0d", a, b, k, cw[k], ref_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
