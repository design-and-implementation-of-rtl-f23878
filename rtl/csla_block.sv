// csla_block: one group of the proposed carry select adder.
//
// Instead of two complete ripple adders (one per possible carry in) and a sum
// multiplexer, the group first computes the half-sum and half-carry words
// (hsg_unit), then two carry words for carry in 0 and 1 (cg0_unit, cg1_unit),
// selects one carry word with the real carry in (cs_unit), and only then forms
// the sum (fsg_unit). Selecting carries rather than sums lets the sum XORs sit
// after the selection and keeps the path from cin to cout to one AND-OR gate.
//
// Interface: a, b, cin in; sum and cout (= selected carry word bit N-1) out.
// Combinational. The unit structure and wiring follow the design; N >= 2.
module csla_block #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0, c0, c10, c11, c;

  hsg_unit #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  cg0_unit #(.N(N)) u_cg0 (.s0(s0[N-1:1]), .c0(c0), .c10(c10));
  cg1_unit #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c11(c11));
  cs_unit  #(.N(N)) u_cs  (.c10(c10), .c11(c11), .cin(cin), .c(c));
  fsg_unit #(.N(N)) u_fsg (.s0(s0), .c(c[N-2:0]), .cin(cin), .s(sum));

  assign cout = c[N-1];
endmodule
