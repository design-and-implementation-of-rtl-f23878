// subtractor: N-bit subtractor on the square-root carry select adder.
//
// diff = a - b is formed as a + ~b + 1: the subtrahend is inverted and the
// adder's carry in is tied to 1. The borrow out is the inverse of the adder's
// carry out, so borrow = 1 exactly when b > a (unsigned). The design names a
// 16-bit subtractor on the proposed adder; the inverter-plus-adder form and
// the borrow output are this implementation's choice. Combinational.
module subtractor #(
  parameter int unsigned N       = 16,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] diff,
  output logic         borrow
);
  logic cout;

  sqrt_csla #(.N(N), .NGROUPS(NGROUPS)) u_add (
    .a(a), .b(~b), .cin(1'b1), .sum(diff), .cout(cout)
  );

  assign borrow = ~cout;
endmodule
