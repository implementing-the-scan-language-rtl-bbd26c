// scan_pkg: constants and helper functions shared by the SCAN address
// sequencer. A SCAN level with side a (a power of two) has n = a*a pels;
// its pel index is log2(n) = 2*log2(a) bits wide, made of a row field
// (high half) and a column field (low half). The helpers below compute
// these widths so that every module derives them the same way.
package scan_pkg;

  // Bits of one coordinate (row or column) of a level with side a.
  function automatic int unsigned coord_bits(int unsigned a);
    return (a <= 1) ? 0 : $clog2(a);
  endfunction

  // Bits of a level's pel index (row field and column field together).
  function automatic int unsigned index_bits(int unsigned a);
    return 2 * coord_bits(a);
  endfunction

  // Width of a dense code for d values; at least one bit so that ports
  // never become zero-width.
  function automatic int unsigned code_bits(int unsigned d);
    return (d <= 2) ? 1 : $clog2(d);
  endfunction

endpackage
