// ra_full_adder: full adder of two reduced-area half adders and one gate.
//
// The first half adder adds a and b; the second adds that partial sum and
// cin. The two half-adder carries can never both be 1, and the carry out is
// their OR: 4 + 4 + 1 = 9 gates. The two-half-adder structure and gate count
// follow the design; the combining gate being an OR is what the function
// requires. Purely combinational.
module ra_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic s1, c1, c2;

  ra_half_adder u_ha1 (.a(a),  .b(b),   .sum(s1),  .carry(c1));
  ra_half_adder u_ha2 (.a(s1), .b(cin), .sum(sum), .carry(c2));

  assign cout = c1 | c2;
endmodule
