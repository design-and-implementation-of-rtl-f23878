// hsg_unit: half-sum generator of one carry select adder group.
//
// N reduced-area half adders, one per bit, turn the operands a and b into the
// half-sum word s0 = a ^ b and the half-carry word c0 = a & b. Both carry
// generators and the final-sum generator work from these two words. Follows
// the design; purely combinational, one half-adder delay.
module hsg_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    ra_half_adder u_ha (.a(a[i]), .b(b[i]), .sum(s0[i]), .carry(c0[i]));
  end
endmodule
