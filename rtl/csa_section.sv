// csa_section - one carry select section: Brent-Kung adder, BEC and MUX.
//
// The N-bit Brent-Kung adder adds the section's operand bits with carry-in 0,
// giving an (N+1)-bit result {cout0, sum0}.  An (N+1)-bit binary to excess-1
// converter adds one to that result, which is exactly what the same addition
// gives with carry-in 1.  When the real carry from the section below arrives,
// a 2(N+1):(N+1) multiplexer selects one of the two precomputed results, so
// the carry only passes through one multiplexer per section.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout.  Purely combinational;
// the path from cin to the outputs is a single multiplexer.  The make-up of
// the section (one BK, one N+1-bit BEC, one MUX) follows the published
// structure.
module csa_section #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] sum0;
  logic         cout0;
  logic [N:0]   res0;   // result for carry-in 0
  logic [N:0]   res1;   // result for carry-in 1 = res0 + 1
  logic [N:0]   res;

  bk_adder #(.N(N)) u_bk (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (sum0),
    .cout (cout0)
  );

  assign res0 = {cout0, sum0};

  bec #(.N(N + 1)) u_bec (
    .b (res0),
    .x (res1)
  );

  csa_mux2 #(.N(N + 1)) u_mux (
    .d0  (res0),
    .d1  (res1),
    .sel (cin),
    .y   (res)
  );

  assign sum  = res[N-1:0];
  assign cout = res[N];

endmodule
