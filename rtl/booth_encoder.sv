// booth_encoder: radix-4 (modified) Booth recoding of the multiplier y, with
// the sign-bit extension of y needed when N is odd.
//
// y is an N-bit two's complement number. It is extended with an implicit 0
// below bit 0 and, for odd N, with a copy of its sign bit on top, and then
// cut into D = ceil(N/2) overlapping triplets (y[2i+1], y[2i], y[2i-1]).
// Each triplet becomes a digit in {-2,-1,0,+1,+2} with
//   y = sum_i digit_i * 4^i,
// carried as the select lines of mult_pkg::booth_digit_t:
//   one = y[2i] ^ y[2i-1]
//   two = y[2i+1]&~y[2i]&~y[2i-1] | ~y[2i+1]&y[2i]&y[2i-1]
//   neg = y[2i+1]
// (the triplet 111 gives neg with neither one nor two set, i.e. -0, which
// the partial product generator turns into an all-ones row plus a hot one:
// zero). Combinational.
// The design places a Booth encoder with sign-bit extension in front of the
// partial product generator; radix 4 and this digit coding are choices made
// here, as the design does not fix them.
module booth_encoder
  import mult_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned D = booth_digits(N)
) (
  input  logic [N-1:0]         y,
  output booth_digit_t [D-1:0] digit
);
  logic [2*D:0] ye;  // ye[k+1] = y[k]; ye[0] is the implicit zero

  always_comb begin
    ye[0] = 1'b0;
    for (int unsigned k = 0; k < 2 * D; k++) begin
      ye[k+1] = (k < N) ? y[k] : y[N-1];
    end
  end

  for (genvar i = 0; i < D; i++) begin : g_digit
    logic b2, b1, b0;
    assign b0 = ye[2*i];
    assign b1 = ye[2*i+1];
    assign b2 = ye[2*i+2];
    assign digit[i].one = b1 ^ b0;
    assign digit[i].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
    assign digit[i].neg = b2;
  end
endmodule
