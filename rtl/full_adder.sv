// full_adder: one-bit full adder (three inputs of equal weight, sum and carry
// out). It is the cell of the ripple adders of the 4x4 Vedic block and of the
// carry save adder. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
