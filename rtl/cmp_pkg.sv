// cmp_pkg: constants and elaboration-time helpers shared by the comparator.
//
// GROUP is the width of one comparator module (4 bits, as in the design's
// 32 x 4-bit split of a 128-bit operand). The decision tree reduces each bus
// by a factor of DEC_RADIX per level until at most DEC_RADIX bits remain; the
// functions below give the number of OR levels and the width after each one,
// so that the tree can be generated for any operand width.
package cmp_pkg;

  localparam int unsigned GROUP     = 4;
  localparam int unsigned DEC_RADIX = 4;

  // Width of the bus after `lvl` radix-4 OR levels (ceiling division).
  function automatic int unsigned dec_width(int unsigned n, int unsigned lvl);
    int unsigned w = n;
    for (int unsigned i = 0; i < lvl; i++) w = (w + DEC_RADIX - 1) / DEC_RADIX;
    return w;
  endfunction

  // Number of radix-4 OR levels before at most DEC_RADIX bits remain.
  function automatic int unsigned dec_levels(int unsigned n);
    int unsigned w   = n;
    int unsigned lvl = 0;
    while (w > DEC_RADIX) begin
      w   = (w + DEC_RADIX - 1) / DEC_RADIX;
      lvl = lvl + 1;
    end
    return lvl;
  endfunction

endpackage
