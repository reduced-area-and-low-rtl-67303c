// csla_pkg - group layout of the square-root carry select adder.
//
// The adder is cut into groups that grow by one bit each: group 0 has 2 bits,
// group g >= 1 has g+1 bits (2, 2, 3, 4, 5, ... ). For 16 bits this gives the
// five groups [1:0], [3:2], [6:4], [10:7], [15:11] of the design. For a width
// that the sequence does not hit exactly, the last group is cut down to the
// bits that are left (for example 8 bits -> 2, 2, 3, 1); that rule is this
// implementation's choice. The functions are constant functions used at
// elaboration time.
package csla_pkg;

  // size of group g if nothing were cut off
  function automatic int unsigned nominal_size(int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // bit position of the least significant bit of group g
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += nominal_size(i);
    return lsb;
  endfunction

  // number of groups needed to cover width bits
  function automatic int unsigned num_groups(int unsigned width);
    int unsigned g = 0;
    while (group_lsb(g) < width) g++;
    return g;
  endfunction

  // size of group g in a width-bit adder, the last group cut to fit
  function automatic int unsigned group_size(int unsigned width, int unsigned g);
    int unsigned lsb = group_lsb(g);
    int unsigned sz  = nominal_size(g);
    return (lsb + sz > width) ? width - lsb : sz;
  endfunction

endpackage
