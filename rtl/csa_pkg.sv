// csa_pkg - constants shared by the modified square-root carry select adder.
//
// The 16-bit adder is cut into five sections whose widths grow from the
// least significant end: 2, 2, 3, 4 and 5 bits (bits [1:0], [3:2], [6:4],
// [10:7] and [15:11]).  The lowest section is a plain Brent-Kung adder fed by
// the adder's carry-in; each higher section computes its sum for a carry-in
// of 0 and derives the carry-in-of-1 result by adding one (binary to
// excess-1 conversion), then a multiplexer picks one.  The section widths
// are those of the published 16-bit structure; group_lsb() is this design's
// helper for placing a section inside the word.
package csa_pkg;

  localparam int unsigned WORD_W   = 16;
  localparam int unsigned N_GROUPS = 5;

  typedef int unsigned group_widths_t [N_GROUPS];

  // Section widths, index 0 = least significant section.
  localparam group_widths_t DEFAULT_GROUP_W = '{2, 2, 3, 4, 5};

  // Bit position of the least significant bit of section k.
  function automatic int unsigned group_lsb(input group_widths_t w, input int unsigned k);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned j = 0; j < k; j++) lsb += w[j];
    return lsb;
  endfunction

  // Sum of all section widths, to check against the word width.
  function automatic int unsigned total_width(input group_widths_t w);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j < N_GROUPS; j++) s += w[j];
    return s;
  endfunction

endpackage
