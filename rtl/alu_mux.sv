// alu_mux: the ALU's 16:1 result multiplexer.
//
// Every unit of the ALU computes all the time; this multiplexer passes the
// one result named by the 4-bit opcode sel (codes in csla_pkg::alu_op_e).
// The four codes without an operation select zero, which is this
// implementation's choice. Combinational.
module alu_mux #(
  parameter int unsigned N = 16
) (
  input  csla_pkg::alu_op_e sel,
  input  logic [N-1:0]      sum_i,
  input  logic [N-1:0]      mul_i,
  input  logic [N-1:0]      sub_i,
  input  logic [N-1:0]      and_i,
  input  logic [N-1:0]      or_i,
  input  logic [N-1:0]      nand_i,
  input  logic [N-1:0]      nor_i,
  input  logic [N-1:0]      xor_i,
  input  logic [N-1:0]      inc_i,
  input  logic [N-1:0]      dec_i,
  input  logic [N-1:0]      not_i,
  input  logic [N-1:0]      twos_i,
  output logic [N-1:0]      z
);
  import csla_pkg::*;

  always_comb begin
    unique case (sel)
      OP_SUM:  z = sum_i;
      OP_MUL:  z = mul_i;
      OP_SUB:  z = sub_i;
      OP_AND:  z = and_i;
      OP_OR:   z = or_i;
      OP_NAND: z = nand_i;
      OP_NOR:  z = nor_i;
      OP_XOR:  z = xor_i;
      OP_INC:  z = inc_i;
      OP_DEC:  z = dec_i;
      OP_NOT:  z = not_i;
      OP_TWOS: z = twos_i;
      default: z = '0;
    endcase
  end
endmodule
