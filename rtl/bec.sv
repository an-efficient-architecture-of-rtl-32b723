// bec - N-bit binary to excess-1 converter: x = b + 1 (mod 2^N).
//
// Bit 0 is inverted; every higher bit i is flipped when all bits below it are
// one: x[i] = b[i] ^ (b[0] & ... & b[i-1]).  The AND terms are built as a
// chain, each one extending the previous by one bit, as in the published
// 4-bit converter (x2 uses b0&b1, x3 uses b0&b1&b2).  It replaces a second
// adder for carry-in 1 in a carry select section: the section's carry-in-0
// result {cout, sum}, plus one, is its carry-in-1 result.
//
// Interface: b (N bits) -> x (N bits).  Purely combinational.  The equations
// follow the published converter; the width parameter generalising it is
// this design's.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  logic [N-1:0] all_ones_below;   // all_ones_below[i] = &b[i-1:0], 1 for i = 0

  assign all_ones_below[0] = 1'b1;

  for (genvar i = 1; i < N; i++) begin : g_chain
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign x = b ^ all_ones_below;

endmodule
