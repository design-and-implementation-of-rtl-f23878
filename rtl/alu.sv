// alu: 16-bit arithmetic logic unit built on the square-root carry select
// adder.
//
// All units work in parallel on the operands and a 16:1 multiplexer picks
// one result by the 4-bit opcode sel, so each operation completes within the
// combinational delay of its unit. Operations (opcode: result):
//   0001 SUM       a + b + cin           (square-root carry select adder)
//   0010 Multiply  a[7:0] * b[7:0]       (8x8 array multiplier, 16-bit product)
//   0011 Subtract  a - b                 (inverter + adder, carry in 1)
//   0100 AND, 0101 OR, 0110 NAND, 0111 NOR, 1000 XOR   bitwise on a, b
//   1001 Increment a + 1, 1010 Decrement a - 1
//   1011 NOT       ~a
//   1100 Two's complement -a             (inverter + incrementer)
//   others         0
// carry_out is the SUM adder's carry out and borrow_out the subtractor's
// borrow, whatever the opcode.
//
// The operation set, opcodes, widths and the use of the proposed adder in
// the arithmetic units follow the design. The zero result for the free
// opcodes, cin acting on SUM only, and bringing out carry_out and borrow_out
// are this implementation's choices. No clock: the design has the ALU finish
// each operation in one cycle, which any register placed around it gives.
module alu #(
  parameter int unsigned N       = 16,
  parameter int unsigned MW      = 8,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic              cin,
  input  csla_pkg::alu_op_e sel,
  output logic [N-1:0]      z,
  output logic              carry_out,
  output logic              borrow_out
);
  logic [N-1:0]    sum_r, sub_r, inc_r, dec_r, twos_r;
  logic [N-1:0]    and_r, or_r, nand_r, nor_r, xor_r, not_r;
  logic [2*MW-1:0] mul_r;
  logic [N-1:0]    mul_z;

  sqrt_csla #(.N(N), .NGROUPS(NGROUPS)) u_sum (
    .a(a), .b(b), .cin(cin), .sum(sum_r), .cout(carry_out)
  );

  array_multiplier #(.MW(MW)) u_mul (.a(a[MW-1:0]), .b(b[MW-1:0]), .p(mul_r));

  subtractor #(.N(N), .NGROUPS(NGROUPS)) u_sub (
    .a(a), .b(b), .diff(sub_r), .borrow(borrow_out)
  );

  logic_unit #(.N(N)) u_logic (
    .a(a), .b(b), .and_o(and_r), .or_o(or_r), .nand_o(nand_r),
    .nor_o(nor_r), .xor_o(xor_r), .not_o(not_r)
  );

  incrementer     #(.N(N), .NGROUPS(NGROUPS)) u_inc  (.a(a), .y(inc_r));
  decrementer     #(.N(N), .NGROUPS(NGROUPS)) u_dec  (.a(a), .y(dec_r));
  twos_complement #(.N(N), .NGROUPS(NGROUPS)) u_twos (.a(a), .y(twos_r));

  // The product is zero-extended (or truncated) to the result width.
  assign mul_z = N'(mul_r);

  alu_mux #(.N(N)) u_mux (
    .sel(sel), .sum_i(sum_r), .mul_i(mul_z), .sub_i(sub_r), .and_i(and_r),
    .or_i(or_r), .nand_i(nand_r), .nor_i(nor_r), .xor_i(xor_r), .inc_i(inc_r),
    .dec_i(dec_r), .not_i(not_r), .twos_i(twos_r), .z(z)
  );
endmodule
