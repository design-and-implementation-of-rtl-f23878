// twos_complement: y = -a (modulo 2^N).
//
// As in the design, the operand passes through a row of inverters and the
// result feeds the incrementer, which adds 1. Combinational.
module twos_complement #(
  parameter int unsigned N       = 16,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] y
);
  logic [N-1:0] a_inv;

  assign a_inv = ~a;

  incrementer #(.N(N), .NGROUPS(NGROUPS)) u_inc (.a(a_inv), .y(y));
endmodule
