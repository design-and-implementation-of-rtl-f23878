// sqrt_csla: N-bit square-root carry select adder.
//
// The operands are cut into NGROUPS groups of growing width. Every group is a
// csla_block; its carry in is the previous group's carry out, and the first
// group takes the adder's cin. Each group computes its two candidate carry
// words while the carry from below is still on its way, so a wider group is
// ready just as its carry in arrives: the carry ripples through only one
// AND-OR gate per group, and group widths grow roughly with the square root
// rule that gives the adder its name.
//
// Interface: a, b, cin in; sum, cout out. Combinational.
// The group structure follows the design; the group widths (2,2,3,4,... with
// the last group taking the rest, see csla_pkg) and NGROUPS = 5 for 16 bits
// are this implementation's choices. Set NGROUPS to 7 for 32 bits and 10 for
// 64 bits to get the groupings used for those widths.
module sqrt_csla #(
  parameter int unsigned N       = 16,
  parameter int unsigned NGROUPS = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  import csla_pkg::*;

  // carry[g] is the carry into group g; carry[NGROUPS] is the adder's cout.
  logic [NGROUPS:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = group_width(N, NGROUPS, g);

    csla_block #(.N(W)) u_blk (
      .a   (a[LSB +: W]),
      .b   (b[LSB +: W]),
      .cin (carry[g]),
      .sum (sum[LSB +: W]),
      .cout(carry[g+1])
    );
  end

  assign cout = carry[NGROUPS];

  initial begin
    assert (group_lsb(NGROUPS - 1) + 2 <= N)
      else $fatal(1, "sqrt_csla: N=%0d too small for NGROUPS=%0d", N, NGROUPS);
  end
endmodule
