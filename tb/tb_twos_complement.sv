// tb_twos_complement: exhaustive check of the 16-bit twos_complement: for every a the
// output must equal -a modulo 2^16, computed with integer arithmetic.
// Watchdog included.
module tb_twos_complement;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [15:0] a, y;

  twos_complement dut (.a(a), .y(y));

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
      a = 16'(i);
      #1;
      checks++;
      if (y !== 16'(0 - int'(a))) begin
        failures++;
        $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
