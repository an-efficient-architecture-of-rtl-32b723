// msqrt_bk_csa - 16-bit modified square-root carry select adder built from
// Brent-Kung adders and binary to excess-1 converters.
//
// The word is split into sections of growing width, 2, 2, 3, 4 and 5 bits
// from the least significant end.  Section 0 (bits [1:0]) is a Brent-Kung
// adder taking the adder's carry-in.  Every higher section precomputes its
// result for carry-in 0 with a Brent-Kung adder and for carry-in 1 with a
// binary to excess-1 converter, and selects one with the carry out of the
// section below.  Widening the sections towards the top lets each section's
// local addition finish about when the selected carry from below arrives,
// while the converter costs fewer gates than a second adder.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.  Purely
// combinational; the critical path is section 0's adder followed by one
// multiplexer per higher section.  Section count and widths, the carry-in of
// the bottom section and the N+1-bit converter per N-bit section follow the
// published 16-bit structure.  The parameters allowing other widths are
// this design's.
module msqrt_bk_csa
  import csa_pkg::*;
#(
  parameter int unsigned   WIDTH   = WORD_W,
  parameter group_widths_t GROUP_W = DEFAULT_GROUP_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  if (total_width(GROUP_W) != WIDTH) begin : g_bad_widths
    $error("msqrt_bk_csa: section widths do not add up to WIDTH");
  end

  logic [N_GROUPS:0] carry;   // carry[k] = carry into section k

  assign carry[0] = cin;

  for (genvar k = 0; k < N_GROUPS; k++) begin : g_sec
    localparam int unsigned LSB = group_lsb(GROUP_W, k);
    localparam int unsigned GW  = GROUP_W[k];

    if (k == 0) begin : g_first
      bk_adder #(.N(GW)) u_bk (
        .a    (a[LSB +: GW]),
        .b    (b[LSB +: GW]),
        .cin  (carry[k]),
        .sum  (sum[LSB +: GW]),
        .cout (carry[k+1])
      );
    end else begin : g_sel
      csa_section #(.N(GW)) u_sec (
        .a    (a[LSB +: GW]),
        .b    (b[LSB +: GW]),
        .cin  (carry[k]),
        .sum  (sum[LSB +: GW]),
        .cout (carry[k+1])
      );
    end
  end

  assign cout = carry[N_GROUPS];

endmodule
