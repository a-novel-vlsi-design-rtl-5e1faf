// carry_select_adder: final stage of the proposed multiplier. It adds a
// single carry bit cin to a W-bit operand a:
//   cin = 0: each output multiplexer passes a[i] straight through, so the
//            half adders' results are not used;
//   cin = 1: each multiplexer takes the output of a chain of half adders that
//            add cin to a (an incrementer).
// cout is the carry of the last half adder when cin = 1 and 0 otherwise; the
// multiplier discards it. One half adder and one 2:1 multiplexer per bit, and
// one multiplexer for cout, as in the published carry-select stage. The
// carry into the first half adder is cin itself. Purely combinational.
module carry_select_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;    // half-adder carry chain
  logic [W-1:0] inc;  // a + cin from the half adders

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    half_adder u_ha (.a(a[i]), .b(c[i]), .sum(inc[i]), .carry(c[i+1]));
    assign sum[i] = cin ? inc[i] : a[i];
  end

  assign cout = cin ? c[W] : 1'b0;
endmodule
