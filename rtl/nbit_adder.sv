// nbit_adder: the final carry-propagate adder of the multiplier. It adds the
// two rows left by the Wallace tree, x + y + cin, modulo 2^W.
//
// It is a chain of W nbit_adder_cell cells. Cell i adds x[i] and y[i] and
// both carries of cell i-1: cout of cell i-1 enters on input c and carry of
// cell i-1 on the carry input. Each of those has weight 2^i, so column i
// sums to at most 4 and the cell's outputs cover it exactly. The fourth data
// input d is not needed for two operands and is tied low. cout_o is the
// carry out of the top bit (for two operands carry and cout of the last
// cell are never both set).
// Combinational; the delay is a ripple through W cells.
// The design calls for a final adder built around this four-input cell; the
// ripple arrangement is a choice made here, and a faster carry-propagate
// structure can replace it behind the same ports.
module nbit_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout_o
);
  logic [W:0] carry;  // carry[i]: carry output of cell i-1, weight 2^i
  logic [W:0] cout;   // cout[i]:  cout output of cell i-1, weight 2^i

  assign carry[0] = cin;
  assign cout[0]  = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    nbit_adder_cell u_cell (
      .a    (x[i]),
      .b    (y[i]),
      .c    (cout[i]),
      .d    (1'b0),
      .cin  (carry[i]),
      .sum  (sum[i]),
      .carry(carry[i+1]),
      .cout (cout[i+1])
    );
  end

  assign cout_o = carry[W] | cout[W];
endmodule
