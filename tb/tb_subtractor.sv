// tb_subtractor: checks the 16-bit subtractor against integer subtraction:
// diff = (a - b) mod 2^16 and borrow = (b > a). Corner cases and random
// operands, with a count of cases that produced a borrow. Watchdog included.
module tb_subtractor;
  int checks = 0, failures = 0, borrows = 0;
  logic clk = 1'b0;
  logic [15:0] a, b, diff;
  logic borrow;

  subtractor dut (.a(a), .b(b), .diff(diff), .borrow(borrow));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (borrow) borrows++;
    if (diff !== 16'(int'(x) - int'(y)) || borrow !== (y > x)) begin
      failures++;
      $display("FAIL %h - %h = %h borrow %b", x, y, diff, borrow);
    end
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'h0000, 16'h0001);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h0000, 16'hFFFF);
    apply(16'hA736, 16'h9D3B);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    if (borrows == 0) begin
      failures++;
      $display("FAIL no borrow was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
