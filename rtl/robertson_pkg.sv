// robertson_pkg: constants shared by the Robertson multiplier modules.
//
// The multiplier keeps one working register m of 2N+1 bits.  Its upper N+1
// bits hold the partial product P as a signed number with one guard bit, its
// lower N bits hold the multiplier bits that have not yet been consumed.  The
// guard bit is this design's own choice: it lets a sum such as P + a keep its
// true sign, so the bit shifted in at the top is always the sign of P.
//
// The six operand widths are the ones the multiplier was realized at; the top
// level instantiates one multiplier of each.
package robertson_pkg;

  // Operand widths realized side by side in robertson_multipliers.
  localparam int unsigned NUM_WIDTHS = 6;
  localparam int unsigned WIDTHS [NUM_WIDTHS] = '{4, 6, 8, 12, 16, 32};

  // Width of the working register for N-bit operands.
  function automatic int unsigned wreg_width(int unsigned n);
    return 2 * n + 1;
  endfunction

endpackage
