// carry_save_adder: W-bit carry save adder. It reduces three operands to two
// without carry propagation: one full adder per bit position,
//   s[i]  = a[i] ^ b[i] ^ c[i]
//   cy[i] = majority(a[i], b[i], c[i])   (weight 2^(i+1))
// so that a + b + c = s + 2*cy. In the proposed multiplier it adds the three
// middle partial products in one full-adder delay. Purely combinational.
module carry_save_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .cout(cy[i]));
  end
endmodule
