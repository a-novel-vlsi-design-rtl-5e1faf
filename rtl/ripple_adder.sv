// ripple_adder: W-bit ripple-carry adder, sum = a + b + cin, cout the carry
// out of the top bit. It is the "regular adder" used three times in the 4x4
// Vedic block (Adder1, Adder2, Adder3). The published design only calls these
// regular adders; a chain of full adders is the simplest adder that does the
// job and is this design's choice. Purely combinational.
module ripple_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
