// nbit_adder_cell: four-input adder cell with a carry in. The outputs obey
//   a + b + c + d + cin = sum + 2*(carry + cout)
// with cout set whenever at least two of a, b, c, d are set, so cout never
// depends on cin. That independence is what lets a row of these cells work
// without a long carry chain when they are used as 4:2 compressors.
// The cell follows the published truth table of the multiplier's adder:
//   ones among a..d : 0    1    2    3    4
//   cout            : 0    0    1    1    1
//   {carry,sum}     : cin  1+cin cin  1+cin 2+cin
// Gate form: with p the parity of a..d and q = a&b&c&d,
// {carry,sum} = {q,p} + cin, and p and q are never both set.
// Combinational, no clock.
module nbit_adder_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic p;  // parity of the four data inputs
  logic q;  // all four data inputs set

  assign p     = a ^ b ^ c ^ d;
  assign q     = a & b & c & d;
  assign cout  = (a & b) | (a & c) | (a & d) | (b & c) | (b & d) | (c & d);
  assign sum   = p ^ cin;
  assign carry = q | (p & cin);
endmodule
