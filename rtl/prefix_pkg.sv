// prefix_pkg -- elaboration-time helpers shared by the parallel prefix adders.
//
// The carry generator arrays are built entirely by generate loops; where a
// cell goes, and what kind of cell it is, is decided by the constant
// functions below. bit_is_one(i, j) is the placement rule of the Sklansky
// array (a cell sits on row j+1 of column i when bit j of i is set);
// floor_log2(i) decides between a generate-only cell (the group already
// reaches bit 0) and a full generate/propagate cell. Nothing here produces
// hardware by itself. bit_is_one and the G/GP rule follow the reference
// Sklansky model.
package prefix_pkg;

  // True when bit j of the non-negative integer i is 1.
  function automatic bit bit_is_one(input int i, input int j);
    return ((i >> j) & 1) == 1;
  endfunction

  // floor(log2(i)) for i >= 1; -1 for i = 0 so that no row index is below it.
  function automatic int floor_log2(input int i);
    int r;
    r = -1;
    for (int v = i; v > 0; v = v >> 1) r++;
    return r;
  endfunction

endpackage
