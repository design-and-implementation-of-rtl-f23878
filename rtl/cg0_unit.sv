// cg0_unit: carry generator for an assumed input carry of 0.
//
// From the half-sum word s0 and half-carry word c0 it forms the full-carry
// word c10, where c10[i] is the carry out of bit i if the group's carry in
// were 0:
//   c10[0] = c0[0]
//   c10[i] = c0[i] | (s0[i] & c10[i-1])
// Fixing the carry in to 0 removes the AND-OR of bit 0, so s0[0] is not an
// input at all: the s0 port carries bits N-1..1 only. The design gives this
// unit's function and says its logic is simplified for the fixed carry; the
// AND-OR ripple chain is this implementation's choice. Combinational.
module cg0_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:1] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c10
);
  assign c10[0] = c0[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c10[i] = c0[i] | (s0[i] & c10[i-1]);
  end
endmodule
