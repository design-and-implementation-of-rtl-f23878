// decrementer: y = a - 1 (modulo 2^N).
//
// As in the design, the decrementer is the subtractor with its subtrahend tied
// to the constant 1. The borrow out (set only for a = 0) is not used.
// Combinational.
module decrementer #(
  parameter int unsigned N       = 16,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] y
);
  logic unused_borrow;

  subtractor #(.N(N), .NGROUPS(NGROUPS)) u_sub (
    .a(a), .b(N'(1)), .diff(y), .borrow(unused_borrow)
  );
endmodule
