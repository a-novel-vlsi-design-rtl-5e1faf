// kogge_stone_adder: W-bit Kogge-Stone parallel-prefix adder,
// {cout, sum} = a + b.
// Bit generate/propagate signals g = a&b, p = a^b are combined in
// ceil(log2 W) prefix levels; at level k every bit i >= 2^(k-1) merges with
// bit i - 2^(k-1):
//   G = Gi | Pi & Gj,   P = Pi & Pj.
// After the last level G[i] is the carry out of bit i, so
//   sum[i] = p[i] ^ G[i-1] (carry into bit 0 is 0), cout = G[W-1].
// The published design names the Kogge-Stone adder as its fast adder but
// gives no internal figure; this is the textbook radix-2 form with a full
// prefix tree and no carry in. W must be at least 2. Purely combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = $clog2(W);

  // gl[k] / pl[k]: group generate / propagate after prefix level k; the last
  // level needs no group propagate
  logic [L:0][W-1:0]   gl;
  logic [L-1:0][W-1:0] pl;

  assign gl[0] = a & b;
  assign pl[0] = a ^ b;

  for (genvar k = 1; k <= L; k++) begin : g_level
    localparam int unsigned D = 1 << (k - 1);
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign gl[k][i] = gl[k-1][i] | (pl[k-1][i] & gl[k-1][i-D]);
        if (k < L) begin : g_p
          assign pl[k][i] = pl[k-1][i] & pl[k-1][i-D];
        end
      end else begin : g_pass
        assign gl[k][i] = gl[k-1][i];
        if (k < L) begin : g_p
          assign pl[k][i] = pl[k-1][i];
        end
      end
    end
  end

  assign sum  = pl[0] ^ {gl[L][W-2:0], 1'b0};
  assign cout = gl[L][W-1];
endmodule
