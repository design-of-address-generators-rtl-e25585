// addr_gen_pkg: sizing rules shared by the multiple LUT cascade address generator.
//
// An n-input address generator for k registered vectors is split into g groups of at
// most 2^r-1 vectors; each group is an LUT cascade of s cells. The first cell reads p
// primary inputs, every later cell reads the r rails of its predecessor plus p-r
// primary inputs, and the last cell takes whatever primary inputs remain (so it has at
// most p address lines). The primary input vector is packed MSB first: x[n-1] is x_1,
// the first variable of the truth table, so cell 1 reads the top p bits.
//
// The level count follows the bound s <= ceil((n-r)/(p-r)) of the address-generator
// theorem, written here as 1 + ceil((n-p)/(p-r)), which gives the level counts of all
// six published configurations (5, 6, 6, 8, 8, 9 levels). The group count is
// g = ceil(k/(2^r-1)). The output width is the design's own choice: wide enough for the
// largest address any group can produce, g*(2^r-1).
package addr_gen_pkg;

  // Number of cells (levels) in each cascade.
  function automatic int unsigned num_levels(int unsigned n, int unsigned p, int unsigned r);
    if (n <= p) return 1;
    return 1 + (n - p + (p - r) - 1) / (p - r);
  endfunction

  // Number of cascades (groups of at most 2^r-1 registered vectors).
  function automatic int unsigned num_groups(int unsigned k, int unsigned r);
    return (k + (2 ** r - 1) - 1) / (2 ** r - 1);
  endfunction

  // Width of the final address.
  function automatic int unsigned out_width(int unsigned k, int unsigned r);
    return $clog2(num_groups(k, r) * (2 ** r - 1) + 1);
  endfunction

  // Number of primary inputs read by cell j (0-based).
  function automatic int unsigned cell_x_width(int unsigned n, int unsigned p, int unsigned r,
                                               int unsigned j);
    int unsigned s;
    s = num_levels(n, p, r);
    if (j == 0) return (n <= p) ? n : p;
    if (j < s - 1) return p - r;
    return n - p - (s - 2) * (p - r);
  endfunction

  // Number of primary inputs consumed by the cells before cell j.
  function automatic int unsigned cell_x_offset(int unsigned p, int unsigned r, int unsigned j);
    if (j == 0) return 0;
    return p + (j - 1) * (p - r);
  endfunction

  // Address width of the RAM of cell j: rails (none for the first cell) plus primary inputs.
  function automatic int unsigned cell_addr_width(int unsigned n, int unsigned p, int unsigned r,
                                                  int unsigned j);
    return ((j == 0) ? 0 : r) + cell_x_width(n, p, r, j);
  endfunction

endpackage
