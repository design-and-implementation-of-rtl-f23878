// fsg_unit: final-sum generator of one carry select adder group.
//
// The sum bit i is the half sum s0[i] XORed with the carry into bit i: cin for
// bit 0, and the selected carry word bit c[i-1] above it. Only the N-1 low
// bits of c come in; the top bit is the group's carry out. Each XOR is the
// reduced-area four-gate XOR. Follows the design; combinational. N >= 2.
module fsg_unit #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] s0,
  input  logic [N-2:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);
  logic [N-1:0] carry_in;

  assign carry_in = {c, cin};

  for (genvar i = 0; i < N; i++) begin : g_bit
    ra_xor u_xor (.a(s0[i]), .b(carry_in[i]), .y(s[i]));
  end
endmodule
