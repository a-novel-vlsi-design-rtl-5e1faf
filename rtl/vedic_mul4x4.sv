// vedic_mul4x4: 4-bit by 4-bit Vedic multiplier built from four 2x2 blocks.
// The operands are split into halves XH = X[3:2], XL = X[1:0], YH, YL:
//   p0 = XL*YL (vertical), p1 = XH*YL, p2 = XL*YH (crosswise), p3 = XH*YH.
// P[1:0] is p0[1:0] directly. Three ripple adders form the rest:
//   Adder1: {p3, 00} + {00, p2}        -> S2[5:0]
//   Adder2: p1 + {00, p0[3:2]}         -> S1[3:0]
//   Adder3: S2 + {00, S1}              -> P[7:2]
// None of these sums can exceed its width for 4-bit operands, so their carry
// outs are constant 0 and left unused. The split, the adder inputs and the
// output slices follow the published 4x4 block diagram; the choice of ripple
// adders is this design's. Purely combinational.
module vedic_mul4x4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  output logic [7:0] p
);
  logic [3:0] p0, p1, p2, p3;
  logic [5:0] s2;
  logic [3:0] s1;
  logic       co1, co2, co3;

  vedic_mul2x2 u_m0 (.x(x[1:0]), .y(y[1:0]), .p(p0));
  vedic_mul2x2 u_m1 (.x(x[3:2]), .y(y[1:0]), .p(p1));
  vedic_mul2x2 u_m2 (.x(x[1:0]), .y(y[3:2]), .p(p2));
  vedic_mul2x2 u_m3 (.x(x[3:2]), .y(y[3:2]), .p(p3));

  ripple_adder #(.W(6)) u_adder1 (
    .a({p3, 2'b00}), .b({2'b00, p2}), .cin(1'b0), .sum(s2), .cout(co1));
  ripple_adder #(.W(4)) u_adder2 (
    .a(p1), .b({2'b00, p0[3:2]}), .cin(1'b0), .sum(s1), .cout(co2));
  ripple_adder #(.W(6)) u_adder3 (
    .a(s2), .b({2'b00, s1}), .cin(1'b0), .sum(p[7:2]), .cout(co3));

  assign p[1:0] = p0[1:0];

  // The three sums always fit their widths (see above).
  always_comb assert (!(co1 | co2 | co3));
endmodule
