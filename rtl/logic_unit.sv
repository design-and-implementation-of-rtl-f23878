// logic_unit: the ALU's bitwise operations on two N-bit operands.
//
// Produces, in parallel, a AND b, a OR b, a NAND b, a NOR b, a XOR b and
// NOT a. The XOR uses the reduced-area four-gate XOR cell per bit; the other
// operations are plain gates. The set of operations follows the design
// (NOT acts on operand a only); gathering them in one module is this
// implementation's choice. Combinational.
module logic_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] and_o,
  output logic [N-1:0] or_o,
  output logic [N-1:0] nand_o,
  output logic [N-1:0] nor_o,
  output logic [N-1:0] xor_o,
  output logic [N-1:0] not_o
);
  assign and_o  = a & b;
  assign or_o   = a | b;
  assign nand_o = ~and_o;
  assign nor_o  = ~or_o;
  assign not_o  = ~a;

  for (genvar i = 0; i < N; i++) begin : g_xor
    ra_xor u_xor (.a(a[i]), .b(b[i]), .y(xor_o[i]));
  end
endmodule
