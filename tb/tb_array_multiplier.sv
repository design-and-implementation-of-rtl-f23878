// tb_array_multiplier: exhaustive check of the 8x8 array multiplier: for every
// pair of unsigned operands the 16-bit product must equal a * b.
// Watchdog included.
module tb_array_multiplier;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;

  array_multiplier dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p !== 16'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
