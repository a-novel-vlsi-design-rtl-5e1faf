// vedic_multiplier: the proposed WIDTH x WIDTH unsigned Vedic multiplier with
// fast adders (default WIDTH = 8, a 16-bit product).
//
// Operands are split into halves of H = WIDTH/2 bits, XH/XL and YH/YL, and
// four H x H sub-multipliers form the Urdhva Tiryakbhyam partial products
//   p0 = XL*YL, p1 = XH*YL, p2 = XL*YH, p3 = XH*YH   (2H bits each).
// They are summed in three stages:
//   P[H-1:0]   = p0[H-1:0]                     (no addition needed)
//   carry save : {p3[H-1:0], p0[2H-1:H]} + p1 + p2 -> S[2H-1:0], C[2H-1:0]
//   P[H]       = S[0]
//   Kogge-Stone: C + {p3[H], S[2H-1:1]}         -> P[3H:H+1], carry Cin
//   carry sel. : p3[2H-1:H+1] + Cin             -> P[4H-1:3H+1], Cout dropped
// For WIDTH = 8 this gives P[3:0] from p0, P[4] = S[0], P[12:5] from the
// Kogge-Stone adder and P[15:13] from the carry-select stage; for WIDTH = 16
// the slices are P[7:0], P[8], P[24:9] and P[31:25]. The stage structure and
// all slices follow the published design. The sub-multipliers are 4x4 Vedic
// blocks when H = 4 and, for larger widths, this module itself at half the
// width (WIDTH must be a power of two, at least 8); that recursion is this
// design's way of covering both the 8-bit and the 16-bit form.
//
// Purely combinational and unsigned: p = x * y, valid after the
// combinational delay of the tree; no clock, no reset.
module vedic_multiplier #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned H = WIDTH / 2;

  if (WIDTH < 8 || (WIDTH & (WIDTH - 1)) != 0) begin : g_bad_width
    $error("vedic_multiplier: WIDTH must be a power of two and at least 8");
  end

  logic [2*H-1:0] p0, p1, p2, p3;

  if (H == 4) begin : g_sub4
    vedic_mul4x4 u_m0 (.x(x[H-1:0]), .y(y[H-1:0]), .p(p0));
    vedic_mul4x4 u_m1 (.x(x[2*H-1:H]), .y(y[H-1:0]), .p(p1));
    vedic_mul4x4 u_m2 (.x(x[H-1:0]), .y(y[2*H-1:H]), .p(p2));
    vedic_mul4x4 u_m3 (.x(x[2*H-1:H]), .y(y[2*H-1:H]), .p(p3));
  end else begin : g_subn
    vedic_multiplier #(.WIDTH(H)) u_m0 (.x(x[H-1:0]), .y(y[H-1:0]), .p(p0));
    vedic_multiplier #(.WIDTH(H)) u_m1 (.x(x[2*H-1:H]), .y(y[H-1:0]), .p(p1));
    vedic_multiplier #(.WIDTH(H)) u_m2 (.x(x[H-1:0]), .y(y[2*H-1:H]), .p(p2));
    vedic_multiplier #(.WIDTH(H)) u_m3 (.x(x[2*H-1:H]), .y(y[2*H-1:H]), .p(p3));
  end

  // Carry save stage
  logic [2*H-1:0] csa_s, csa_c;

  carry_save_adder #(.W(2*H)) u_csa (
    .a ({p3[H-1:0], p0[2*H-1:H]}),
    .b (p2),
    .c (p1),
    .s (csa_s),
    .cy(csa_c)
  );

  // Kogge-Stone stage
  logic [2*H-1:0] ks_sum;
  logic           cin;

  kogge_stone_adder #(.W(2*H)) u_ks (
    .a   (csa_c),
    .b   ({p3[H], csa_s[2*H-1:1]}),
    .sum (ks_sum),
    .cout(cin)
  );

  // Carry select stage
  logic [H-2:0] cs_sum;
  logic         cout;

  carry_select_adder #(.W(H-1)) u_csel (
    .a   (p3[2*H-1:H+1]),
    .cin (cin),
    .sum (cs_sum),
    .cout(cout)
  );

  assign p[H-1:0]     = p0[H-1:0];
  assign p[H]         = csa_s[0];
  assign p[3*H:H+1]   = ks_sum;
  assign p[4*H-1:3*H+1] = cs_sum;

  // The product of two WIDTH-bit numbers fits in 2*WIDTH bits, so the carry
  // out of the carry-select stage is never set.
  always_comb assert (cout == 1'b0);
endmodule
