// mult_pkg: types and constants shared by the blocks of the Booth-encoded
// Wallace tree multiplier.
//
// A radix-4 Booth digit is carried as three select lines {neg, two, one}:
// the partial product of digit i is (one ? X : two ? 2X : 0), inverted when
// neg is set, with neg also added as a "hot one" at the digit's weight.
// booth_row_mask() gives, for a multiplier of n bits, which bit positions
// of each partial-product row can be non-zero; the reduction tree uses it
// so that it only spends adders where bits actually exist.
package mult_pkg;

  // Widest product the mask helper supports (operands up to 128 bits).
  localparam int unsigned MAX_W = 256;

  typedef struct packed {
    logic neg;  // digit is negative: invert the selected multiple, add 1
    logic two;  // |digit| = 2: select X shifted left by one
    logic one;  // |digit| = 1: select X
  } booth_digit_t;

  // Number of radix-4 Booth digits of an n-bit two's complement operand.
  function automatic int unsigned booth_digits(int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Occupied columns of partial-product row r for n-bit operands.
  // Rows 0 .. D-1 hold the sign-extended multiples, shifted by 2r and
  // reaching up to the top product bit 2n-1. Row D holds the hot ones:
  // one bit per digit, at column 2i.
  function automatic logic [MAX_W-1:0] booth_row_mask(int unsigned n, int unsigned r);
    logic [MAX_W-1:0] m;
    int unsigned d;
    m = '0;
    d = booth_digits(n);
    if (r < d) begin
      for (int unsigned k = 2 * r; k < 2 * n; k++) m[k] = 1'b1;
    end else if (r == d) begin
      for (int unsigned i = 0; i < d; i++) m[2*i] = 1'b1;
    end
    return m;
  endfunction

endpackage
