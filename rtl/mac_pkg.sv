// mac_pkg: sizes shared by the multiply-accumulate unit and its parts.
//
// The MAC unit multiplies two unsigned operands with a partial-product
// reducing multiplier and adds the product into an accumulator through a
// Kogge-Stone adder. This package holds the default operand width (8 x 8,
// the main configuration evaluated for this design), the accumulator guard
// bits (a choice of this implementation) and a helper that gives the number
// of partial-product rows that remain after the 4-to-3 row reduction.
package mac_pkg;

  // Operand width of the main configuration: an 8 x 8 bit multiplier.
  localparam int unsigned MULT_W_DEF = 8;

  // Extra accumulator bits above the 2*N-bit product (own choice): 4 bits
  // let 16 full-scale products be summed before the accumulator wraps.
  localparam int unsigned ACC_GUARD_DEF = 4;

  // Rows left after every complete group of four partial products has been
  // rearranged into three; a trailing group of fewer than four rows is kept.
  function automatic int unsigned reduced_rows(int unsigned n);
    return 3 * (n / 4) + (n % 4);
  endfunction

endpackage
