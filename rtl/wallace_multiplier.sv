// wallace_multiplier: signed N x N multiplier, p = x * y in two's complement.
//
// Three stages, as in the block diagram of the design:
//   1. booth_encoder recodes the multiplier y into ceil(N/2) radix-4 Booth
//      digits, halving the number of partial products;
//   2. pp_generator forms the sign-extended partial products of x and the
//      hot ones of the negative digits; wallace_tree reduces that matrix to
//      two rows with layers of 4:2 compressors, full and half adders;
//   3. nbit_adder adds the two rows into the 2N-bit product.
// With the default N = 4 the matrix has three rows (two multiples and the
// hot ones), one reduction layer brings it to two rows, and an 8-bit
// carry-propagate addition finishes the product.
// Interface: x (multiplicand) and y (multiplier), both signed N-bit; p is
// the full 2N-bit signed product. Purely combinational: p is valid one
// propagation delay after x and y settle. N must be at least 2.
// The three-stage structure and the 4 x 4 default follow the design; signed
// operands and the absence of registers are choices made here.
module wallace_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned D = booth_digits(N);
  localparam int unsigned W = 2 * N;
  localparam int unsigned ROWS = D + 1;

  function automatic logic [ROWS-1:0][W-1:0] pp_mask();
    logic [ROWS-1:0][W-1:0] m;
    for (int unsigned r = 0; r < ROWS; r++) m[r] = W'(booth_row_mask(N, r));
    return m;
  endfunction

  localparam logic [ROWS-1:0][W-1:0] PP_MASK = pp_mask();

  booth_digit_t [D-1:0]    digit;
  logic [ROWS-1:0][W-1:0]  pp;
  logic [W-1:0]            row_a, row_b;
  logic                    cout_unused;

  booth_encoder #(.N(N)) u_booth (
    .y    (y),
    .digit(digit)
  );

  pp_generator #(.N(N)) u_ppg (
    .x    (x),
    .digit(digit),
    .pp   (pp)
  );

  wallace_tree #(.W(W), .ROWS(ROWS), .MASK(PP_MASK)) u_tree (
    .pp   (pp),
    .row_a(row_a),
    .row_b(row_b)
  );

  // The carry out of the top bit lies beyond the 2N-bit product.
  nbit_adder #(.W(W)) u_add (
    .x     (row_a),
    .y     (row_b),
    .cin   (1'b0),
    .sum   (p),
    .cout_o(cout_unused)
  );
endmodule
