// tb_ra_xor: exhaustive check of the four-gate XOR cell against the XOR truth
// table written out as a constant. A watchdog ends the run if it hangs.
module tb_ra_xor;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic a, b, y;
  localparam logic [3:0] TRUTH = 4'b0110;  // index {a,b}

  ra_xor dut (.a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
