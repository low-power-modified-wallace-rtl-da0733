// pp_generator: builds the partial-product bit matrix of the multiplier from
// the multiplicand x and the Booth digits of the multiplier.
//
// Row i (0 <= i < D) is digit i times x, shifted left by 2i and
// sign-extended up to the top product bit 2N-1. The multiple is formed as an
// (N+1)-bit value: x sign-extended by one bit (one), x shifted left by one
// (two) or zero, and every bit is inverted when the digit is negative. The
// +1 that completes the two's complement of a negative multiple is placed
// in row D at column 2i (the "hot one"). The sum of all rows modulo 2^(2N)
// is the product x*y. Bits outside mult_pkg::booth_row_mask() are zero.
// Combinational.
// The generator's role follows the design; full sign extension of every row
// and the separate hot-one row are choices made here.
module pp_generator
  import mult_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned D = booth_digits(N),
  localparam int unsigned W = 2 * N,
  localparam int unsigned ROWS = D + 1
) (
  input  logic [N-1:0]          x,
  input  booth_digit_t [D-1:0]  digit,
  output logic [ROWS-1:0][W-1:0] pp
);
  always_comb begin
    logic [N:0]   mag;  // selected multiple, 0, x or 2x
    logic [N:0]   sel;  // multiple after the conditional inversion
    logic [W-1:0] ext;  // sel sign-extended to the product width
    pp = '0;
    for (int unsigned i = 0; i < D; i++) begin
      if (digit[i].one)      mag = {x[N-1], x};
      else if (digit[i].two) mag = {x, 1'b0};
      else                   mag = '0;
      sel = mag ^ {(N + 1){digit[i].neg}};
      ext = {{(W - N - 1){sel[N]}}, sel};
      pp[i] = ext << (2 * i);
      pp[D][2*i] = digit[i].neg;
    end
  end
endmodule
