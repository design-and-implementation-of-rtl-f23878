// ra_half_adder: reduced-area half adder, four gates in all.
//
// The reduced-area XOR already contains the AND of its inputs; that AND gate
// is tapped as the carry, so the half adder needs no gate beyond the XOR's
// four (two fewer than an XOR of five gates plus a separate AND).
//   sum   = (a | b) & ~(a & b)
//   carry = a & b
// The structure follows the design; purely combinational.
module ra_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic and_ab, or_ab;

  assign and_ab = a & b;
  assign or_ab  = a | b;
  assign carry  = and_ab;
  assign sum    = or_ab & ~and_ab;
endmodule
