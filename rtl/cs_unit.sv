// cs_unit: carry select unit of one carry select adder group.
//
// Picks the final carry word c from the two candidate words: c10 when cin is
// 0, c11 when cin is 1. Because c10[i] = 1 always implies c11[i] = 1, the
// 2-to-1 multiplexer per bit reduces to one AND-OR gate:
//   c[i] = c10[i] | (cin & c11[i])
// This follows the design. Combinational; cin reaches c through one AND-OR,
// which is what keeps the carry path between groups short.
module cs_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] c10,
  input  logic [N-1:0] c11,
  input  logic         cin,
  output logic [N-1:0] c
);
  assign c = c10 | ({N{cin}} & c11);
endmodule
