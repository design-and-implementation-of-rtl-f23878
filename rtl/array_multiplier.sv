// array_multiplier: MW x MW unsigned multiplier with a 2*MW-bit product.
//
// Partial products pp[i][j] = a[j] & b[i] are reduced by a carry-save array:
// row i (1 .. MW-1) adds partial-product row i to the sum bits of row i-1
// (shifted down by one) and the carries of row i-1. The lowest sum bit of
// each row is a finished product bit. The sums and carries left after the
// last row are combined by a ripple row. Cells with three inputs are
// reduced-area full adders, cells with two inputs reduced-area half adders,
// so every XOR is the four-gate reduced-area XOR.
//
// The design states an 8-bit multiplier built with the reduced-area XOR; the
// array organisation and unsigned operands are this implementation's choice.
// Combinational. MW >= 3.
module array_multiplier #(
  parameter int unsigned MW = 8
) (
  input  logic [MW-1:0]   a,
  input  logic [MW-1:0]   b,
  output logic [2*MW-1:0] p
);
  // s[i][j]: sum out of row i, column j (weight i+j).
  // c[i][j]: carry out of row i, column j (weight i+j+1).
  logic [MW-1:0] pp [MW];
  logic [MW-1:0] s  [MW];
  logic [MW-1:0] c  [MW];
  logic [MW-1:0] r;          // ripple carries of the final row

  for (genvar i = 0; i < MW; i++) begin : g_pp
    assign pp[i] = a & {MW{b[i]}};
  end

  // Row 0 is the first partial product row itself.
  assign s[0] = pp[0];
  assign c[0] = '0;

  for (genvar i = 1; i < MW; i++) begin : g_row
    for (genvar j = 0; j < MW; j++) begin : g_col
      if (j == MW - 1) begin : g_top
        // Leftmost cell: no sum bit from the row above at this weight.
        ra_half_adder u_ha (.a(pp[i][j]), .b(c[i-1][j]), .sum(s[i][j]), .carry(c[i][j]));
      end else if (i == 1) begin : g_first
        // Row 1: the carries of row 0 are all zero.
        ra_half_adder u_ha (.a(pp[i][j]), .b(s[i-1][j+1]), .sum(s[i][j]), .carry(c[i][j]));
      end else begin : g_full
        ra_full_adder u_fa (.a(pp[i][j]), .b(s[i-1][j+1]), .cin(c[i-1][j]),
                            .sum(s[i][j]), .cout(c[i][j]));
      end
    end
  end

  for (genvar i = 0; i < MW; i++) begin : g_low
    assign p[i] = s[i][0];
  end

  // Final ripple row: product bits MW .. 2*MW-1.
  ra_half_adder u_fin0 (.a(s[MW-1][1]), .b(c[MW-1][0]), .sum(p[MW]), .carry(r[0]));
  for (genvar k = 1; k < MW - 1; k++) begin : g_fin
    ra_full_adder u_fa (.a(s[MW-1][k+1]), .b(c[MW-1][k]), .cin(r[k-1]),
                        .sum(p[MW+k]), .cout(r[k]));
  end
  // The carry out of the top cell is always 0: the product fits 2*MW bits.
  ra_half_adder u_fint (.a(c[MW-1][MW-1]), .b(r[MW-2]), .sum(p[2*MW-1]), .carry(r[MW-1]));
endmodule
