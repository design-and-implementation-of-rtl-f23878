// csla_pkg: constants and helper functions shared by the square-root carry
// select adder (SQRT CSLA) and the ALU built on it.
//
// ALU opcodes follow the operation table of the design (4-bit select of a 16:1
// multiplexer). The four codes the table leaves free (0000, 1101, 1110, 1111)
// are given names here only so the multiplexer can decode them to zero; that
// is this implementation's choice.
//
// The SQRT CSLA group widths are this implementation's choice: 2, 2, 3, 4, ...
// (each group one bit wider than the one before, from the third group on),
// with the last group taking whatever bits remain. For 16 bits and 5 groups
// that is 2,2,3,4,5; for 32 bits and 7 groups 2,2,3,4,5,6,10; for 64 bits and
// 10 groups 2,2,3,4,5,6,7,8,9,18.
package csla_pkg;

  typedef enum logic [3:0] {
    OP_NONE0 = 4'b0000,
    OP_SUM   = 4'b0001,
    OP_MUL   = 4'b0010,
    OP_SUB   = 4'b0011,
    OP_AND   = 4'b0100,
    OP_OR    = 4'b0101,
    OP_NAND  = 4'b0110,
    OP_NOR   = 4'b0111,
    OP_XOR   = 4'b1000,
    OP_INC   = 4'b1001,
    OP_DEC   = 4'b1010,
    OP_NOT   = 4'b1011,
    OP_TWOS  = 4'b1100,
    OP_NONE1 = 4'b1101,
    OP_NONE2 = 4'b1110,
    OP_NONE3 = 4'b1111
  } alu_op_e;

  // Nominal width of group g before the last one: 2, 2, 3, 4, 5, ...
  function automatic int unsigned nominal_width(int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Bit position of the least significant bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned pos = 0;
    for (int unsigned k = 0; k < g; k++) pos += nominal_width(k);
    return pos;
  endfunction

  // Width of group g in an n-bit adder of ngroups groups; the last group
  // takes the remaining bits.
  function automatic int unsigned group_width(int unsigned n, int unsigned ngroups,
                                              int unsigned g);
    return (g == ngroups - 1) ? n - group_lsb(g) : nominal_width(g);
  endfunction

endpackage
