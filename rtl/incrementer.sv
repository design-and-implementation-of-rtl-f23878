// incrementer: y = a + 1 (modulo 2^N).
//
// As in the design, the incrementer is the square-root carry select adder
// with one addend tied to the constant 1 (carry in 0). The carry out is not
// used. Combinational.
module incrementer #(
  parameter int unsigned N       = 16,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] y
);
  logic unused_cout;

  sqrt_csla #(.N(N), .NGROUPS(NGROUPS)) u_add (
    .a(a), .b(N'(1)), .cin(1'b0), .sum(y), .cout(unused_cout)
  );
endmodule
