// tb_csla_block: exhaustive check of one carry select adder group at widths
// 4 and 5 (every a, b and cin): {cout,sum} must equal a + b + cin.
// Watchdog included.
module tb_csla_block;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic cin, co4, co5;

  csla_block #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  csla_block #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      {a5, b5, cin} = 11'(i);
      a4 = a5[3:0];
      b4 = b5[3:0];
      #1;
      checks += 2;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin))) begin
        failures++;
        $display("FAIL N=4 a=%h b=%h cin=%b -> %b %h", a4, b4, cin, co4, s4);
      end
      if ({co5, s5} !== 6'(int'(a5) + int'(b5) + int'(cin))) begin
        failures++;
        $display("FAIL N=5 a=%h b=%h cin=%b -> %b %h", a5, b5, cin, co5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
