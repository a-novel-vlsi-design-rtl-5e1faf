// vedic_mul2x2: 2-bit by 2-bit multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule.
//   P0 = X0.Y0                       (vertical product)
//   P1 = X1.Y0 + X0.Y1               (crosswise products, first half adder)
//   P2 = X1.Y1 + carry of P1         (vertical product, second half adder)
//   P3 = carry of P2
// Four AND gates and two half adders, as in the published 2x2 block. The
// carry of the second half adder is taken as an AND of its inputs (a plain
// half adder). Purely combinational: p is valid one gate delay chain after
// x and y.
module vedic_mul2x2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [3:0] p
);
  logic x0y0, x0y1, x1y0, x1y1;
  logic c1;

  assign x0y0 = x[0] & y[0];
  assign x0y1 = x[0] & y[1];
  assign x1y0 = x[1] & y[0];
  assign x1y1 = x[1] & y[1];

  assign p[0] = x0y0;

  half_adder u_ha1 (.a(x0y1), .b(x1y0), .sum(p[1]), .carry(c1));
  half_adder u_ha2 (.a(x1y1), .b(c1),   .sum(p[2]), .carry(p[3]));
endmodule
