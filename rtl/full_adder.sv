// full_adder: one-bit full adder, the 3:2 counter of the Wallace reduction
// layers. Inputs a, b, c of equal weight; sum keeps that weight and carry
// has twice the weight. Combinational, no clock.
// The logic function is the standard one; the cell's transistor-level
// realisation (a low-leakage domino circuit) is outside the scope of RTL.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
