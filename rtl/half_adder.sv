// half_adder: one-bit half adder, used by the Wallace reduction layers on a
// column where two bits are left over. sum keeps the inputs' weight, carry
// has twice the weight. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
