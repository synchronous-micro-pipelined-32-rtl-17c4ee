// mp_pkg: types and constants shared by the micro-pipelined Booth multiplier.
//
// A radix-4 (modified) Booth digit d in {-2,-1,0,+1,+2} is carried between the
// encoder and the Booth multiplexer as three one-hot-ish select lines:
// `one` selects the multiplicand, `two` selects it shifted left by one, and
// `neg` negates the selection. The encoding follows the usual modified Booth
// recoding; the exact signal names are this design's own.
package mp_pkg;

  // Booth select lines of one radix-4 digit.
  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_sel_t;

  // Operand width of the multiplier (32-bit integer multiplication).
  localparam int unsigned OP_W = 32;

  // Booth digits recoded and summed per iteration: one 4:2 compressor row
  // takes exactly four partial products.
  localparam int unsigned DIGITS_PER_ITER = 4;

endpackage
