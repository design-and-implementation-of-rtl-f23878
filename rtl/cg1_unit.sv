// cg1_unit: carry generator for an assumed input carry of 1.
//
// Forms the full-carry word c11, where c11[i] is the carry out of bit i if the
// group's carry in were 1:
//   c11[0] = c0[0] | s0[0]
//   c11[i] = c0[i] | (s0[i] & c11[i-1])
// With the carry in fixed to 1, bit 0 reduces to a single OR. The design gives
// this unit's function; the AND-OR ripple chain is this implementation's
// choice. Combinational; it works in parallel with cg0_unit.
module cg1_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c11
);
  assign c11[0] = c0[0] | s0[0];
  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c11[i] = c0[i] | (s0[i] & c11[i-1]);
  end
endmodule
