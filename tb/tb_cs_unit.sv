// tb_cs_unit: random check of the carry select unit. The candidate carry
// words are drawn so that every 1 of c10 is also a 1 of c11, as real carry
// words always are; the expected output is c10 for cin = 0 and c11 for
// cin = 1, i.e. a plain multiplexer. Watchdog included.
module tb_cs_unit;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] c10, c11, c, expected;
  logic cin;

  cs_unit #(.N(N)) dut (.c10(c10), .c11(c11), .cin(cin), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      c10 = N'($urandom);
      c11 = c10 | N'($urandom);
      cin = i[0];
      #1;
      expected = cin ? c11 : c10;
      checks++;
      if (c !== expected) begin
        failures++;
        $display("FAIL c10=%b c11=%b cin=%b c=%b", c10, c11, cin, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
