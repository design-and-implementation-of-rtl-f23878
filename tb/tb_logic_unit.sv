// tb_logic_unit: random check of the six bitwise operations of the 16-bit
// logic unit against SystemVerilog's own operators. Watchdog included.
module tb_logic_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [15:0] a, b, and_o, or_o, nand_o, nor_o, xor_o, not_o;

  logic_unit dut (.a(a), .b(b), .and_o(and_o), .or_o(or_o), .nand_o(nand_o),
                  .nor_o(nor_o), .xor_o(xor_o), .not_o(not_o));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [15:0] got, logic [15:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h expected %h", name, a, b, got, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      check("AND",  and_o,  a & b);
      check("OR",   or_o,   a | b);
      check("NAND", nand_o, ~(a & b));
      check("NOR",  nor_o,  ~(a | b));
      check("XOR",  xor_o,  a ^ b);
      check("NOT",  not_o,  ~a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
