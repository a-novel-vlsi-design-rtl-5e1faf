// half_adder: one-bit half adder, the basic cell of the 2x2 Vedic block and
// of the carry-select incrementer.
//   sum   = a XOR b
//   carry = a AND b
// Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
