// csa_mux2 - the 2N:N selection stage of a carry select section.
//
// Picks the carry-in-0 result d0 when sel is 0 and the carry-in-1 result d1
// when sel is 1; sel is the real carry arriving from the section below.  In
// the 16-bit adder the stages are 6:3, 8:4, 10:5 and 12:6 (N = 3..6, one
// more than the section width so that the section's carry-out is selected
// along with its sum).
//
// Interface: d0, d1 (N bits), sel -> y (N bits).  Purely combinational.
module csa_mux2 #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
