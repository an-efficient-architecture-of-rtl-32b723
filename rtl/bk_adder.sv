// bk_adder - N-bit Brent-Kung parallel prefix adder with carry-in.
//
// Each bit forms a generate g = a & b and a propagate p = a ^ b.  The carry-in
// is folded into bit 0 (g0' = g0 | p0 & cin) so that every prefix group
// generate G[i:0] is directly the carry out of bit i.  The prefix network is
// the Brent-Kung one: an up-sweep combines neighbouring pairs, then pairs of
// pairs and so on (G3:2, G1:0, then G3:0 for four bits), and a down-sweep
// fills in the remaining positions from the nearest completed prefix (G2:0
// from G2 and G1:0).  Its depth grows as 2*log2(N) - 1 black cells with about
// 2N cells in all.  sum[i] = p[i] ^ carry into bit i.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout.  Purely combinational,
// no clock.  The generate/propagate formulation, the two-level tree of the
// 4-bit drawing and the carry-in input follow the published adder; the
// generic up-sweep/down-sweep for any N is this design's formulation of the
// same tree for the 2-, 3- and 5-bit sections of the 16-bit adder.
module bk_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int W = int'(N);

  logic [N-1:0] g, p;      // bit generate / propagate
  logic [N-1:0] gg, pp;    // group generate / propagate, G[i:0] after the tree
  logic [N:0]   c;         // c[i] = carry into bit i

  always_comb begin
    g  = a & b;
    p  = a ^ b;
    gg = g;
    pp = p;
    gg[0] = g[0] | (p[0] & cin);

    // Up-sweep: (G,P)[i] covers 2d bits ending at i after step d.
    for (int d = 1; d < W; d = d * 2) begin
      for (int i = 2 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end

    // Down-sweep: position (2k+1)d-1 joins the complete prefix at 2kd-1.
    for (int d = W; d >= 1; d = d / 2) begin
      for (int i = 3 * d - 1; i < W; i = i + 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    end

    c[0]   = cin;
    c[N:1] = gg;
    sum    = p ^ c[N-1:0];
    cout   = c[N];
  end

endmodule
