// abp_pkg: types and constants shared by the arbitrary boundary packed
// arithmetic unit.
//
// A packed word of N bits is split into sub-datatypes of any widths. The
// split is described by a mask M: M[i] = 1 when bit i is the least
// significant bit of a sub-datatype. Bit 0 always starts a sub-datatype,
// whatever M[0] holds (a design choice: a word must start somewhere).
//
// The operation encoding below is this design's own; the arithmetic it
// selects follows the published scheme.
package abp_pkg;

  // Width of the combinational multiplier pieces (4-bit operands).
  localparam int unsigned PIECE = 4;

  typedef enum logic [1:0] {
    OP_ADD = 2'd0,  // packed add, carry into every sub-datatype is 0
    OP_ADC = 2'd1,  // packed add, carry into each sub-datatype taken from C'
    OP_MUL = 2'd2   // packed multiply, each product in a double-width field
  } abp_op_e;

  // Number of operands left after one level of 3:2 carry-save compression.
  function automatic int unsigned csa_next(input int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Operand count after `lvl` levels of 3:2 compression starting from n.
  function automatic int unsigned csa_count(input int unsigned n, input int unsigned lvl);
    int unsigned c;
    c = n;
    for (int unsigned k = 0; k < lvl; k++) c = (c > 2) ? csa_next(c) : c;
    return c;
  endfunction

  // Levels needed to bring n operands down to two.
  function automatic int unsigned csa_levels(input int unsigned n);
    int unsigned c, l;
    c = n;
    l = 0;
    while (c > 2) begin
      c = csa_next(c);
      l++;
    end
    return l;
  endfunction

endpackage
