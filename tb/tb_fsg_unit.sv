// tb_fsg_unit: exhaustive check of a 4-bit final-sum generator: sum bit 0 is
// s0[0] xor cin and sum bit i is s0[i] xor c[i-1]. Watchdog included.
module tb_fsg_unit;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] s0, s, expected;
  logic [N-2:0] c;
  logic cin;

  fsg_unit #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .s(s));

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
      {s0, c, cin} = (2 * N)'(i);
      #1;
      expected[0] = s0[0] != cin;
      for (int k = 1; k < N; k++) expected[k] = s0[k] != c[k-1];
      checks++;
      if (s !== expected) begin
        failures++;
        $display("FAIL s0=%b c=%b cin=%b s=%b expected %b", s0, c, cin, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
