// tb_alu: end-to-end test of the 16-bit ALU at its default parameters.
//
// 1. The operand pair a = 1010011100110110, b = 1001110100111011 is run
//    through every opcode and each result is compared with the per-unit
//    values recorded for that pair in the ALU's reference simulation
//    (product 0x0C72, difference 0x09FB, AND 0x8532, ...).
// 2. Random operands, carry in and opcodes (all sixteen codes) are compared
//    with a reference model written with SystemVerilog operators.
// Every operation, the free opcodes, a carry out of the SUM adder, a borrow
// out of the subtractor and a carry in of 1 reaching the sum are counted; a
// count of zero is a failure. The ALU is combinational: each result is
// sampled one time step after its inputs change. Watchdog included.
module tb_alu;
  import csla_pkg::*;
  int checks = 0, failures = 0;
  int op_seen [16];
  int carries = 0, borrows = 0, cin_used = 0;
  logic clk = 1'b0;

  logic [15:0] a, b, z;
  logic        cin, carry_out, borrow_out;
  alu_op_e     sel;

  alu dut (.a(a), .b(b), .cin(cin), .sel(sel), .z(z),
           .carry_out(carry_out), .borrow_out(borrow_out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(logic [15:0] x, logic [15:0] y, logic c, alu_op_e op);
    case (op)
      OP_SUM:  return 16'(int'(x) + int'(y) + int'(c));
      OP_MUL:  return 16'(int'(x[7:0]) * int'(y[7:0]));
      OP_SUB:  return 16'(int'(x) - int'(y));
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_NAND: return ~(x & y);
      OP_NOR:  return ~(x | y);
      OP_XOR:  return x ^ y;
      OP_INC:  return 16'(int'(x) + 1);
      OP_DEC:  return 16'(int'(x) - 1);
      OP_NOT:  return ~x;
      OP_TWOS: return 16'(0 - int'(x));
      default: return 16'h0000;
    endcase
  endfunction

  task automatic apply(logic [15:0] x, logic [15:0] y, logic c, alu_op_e op,
                       logic [15:0] expected);
    logic [16:0] full_sum;
    a = x; b = y; cin = c; sel = op;
    #1;
    full_sum = {1'b0, x} + {1'b0, y} + 17'(c);
    checks += 3;
    op_seen[op]++;
    if (z !== expected) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h cin=%b z=%h expected %h", op.name(), x, y, c, z, expected);
    end
    if (carry_out !== full_sum[16]) begin
      failures++;
      $display("FAIL carry_out a=%h b=%h cin=%b", x, y, c);
    end
    if (borrow_out !== (y > x)) begin
      failures++;
      $display("FAIL borrow_out a=%h b=%h", x, y);
    end
    if (op == OP_SUM && carry_out) carries++;
    if (op == OP_SUB && borrow_out) borrows++;
    if (op == OP_SUM && c && z != 16'(x + y)) cin_used++;
  endtask

  initial begin
    // Reference operand pair with the per-unit results recorded for it.
    apply(16'hA736, 16'h9D3B, 1'b0, OP_MUL,  16'b0000110001110010);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_SUB,  16'b0000100111111011);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_AND,  16'b1000010100110010);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_OR,   16'b1011111100111111);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_NAND, 16'b0111101011001101);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_NOR,  16'b0100000011000000);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_XOR,  16'b0011101000001101);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_INC,  16'b1010011100110111);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_DEC,  16'b1010011100110101);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_NOT,  16'b0101100011001001);
    apply(16'hA736, 16'h9D3B, 1'b0, OP_TWOS, 16'b0101100011001010);
    apply(16'hA736, 16'h9D3B, 1'b1, OP_SUM,  16'h4472);

    // Corner cases and random operations.
    apply(16'hFFFF, 16'h0001, 1'b0, OP_SUM, 16'h0000);
    apply(16'h0000, 16'h0000, 1'b0, OP_DEC, 16'hFFFF);
    apply(16'h0000, 16'h0000, 1'b0, OP_TWOS, 16'h0000);
    apply(16'h00FF, 16'h00FF, 1'b0, OP_MUL, 16'hFE01);
    for (int i = 0; i < 40000; i++) begin
      logic [15:0] x, y;
      logic c;
      alu_op_e op;
      x  = 16'($urandom);
      y  = 16'($urandom);
      c  = 1'($urandom);
      op = alu_op_e'(4'($urandom));
      apply(x, y, c, op, model(x, y, c, op));
    end

    for (int s = 0; s < 16; s++) begin
      $display("opcode %b (%s) applied %0d times", 4'(s), alu_op_e'(s), op_seen[s]);
      if (op_seen[s] == 0) begin
        failures++;
        $display("FAIL opcode %b never applied", 4'(s));
      end
    end
    $display("SUM carry outs %0d, subtract borrows %0d, SUM results changed by cin %0d",
             carries, borrows, cin_used);
    if (carries == 0 || borrows == 0 || cin_used == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
