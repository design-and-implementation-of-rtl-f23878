// ra_xor: reduced-area exclusive OR built from four AND/OR/NOT gates.
//
// y = (a | b) & ~(a & b). One AND, one inverter, one OR and a final AND:
// one gate fewer than the five-gate AND-OR-NOT XOR. This is the basic cell of
// the whole adder family (half adder, full adder, final-sum generator, the
// ALU's XOR operation). The formula and gate set follow the design; the
// module is purely combinational.
module ra_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic and_ab, nand_ab, or_ab;

  assign and_ab  = a & b;
  assign nand_ab = ~and_ab;
  assign or_ab   = a | b;
  assign y       = or_ab & nand_ab;
endmodule
