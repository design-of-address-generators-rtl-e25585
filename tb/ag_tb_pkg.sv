// ag_tb_pkg: reference model and RAM-content generator for the address generator tests.
//
// ref_addr() is the address generation function itself: the 1-based position of x in
// the list of registered vectors, or 0. It knows nothing about cascades.
//
// cell_word() gives the word stored at address a of cell j of a cascade that holds the
// group `vecs` (local addresses 1..vecs.size()). It uses the rail encoding "smallest
// local address among the vectors that agree with the input seen so far, or 0": after
// cell j every distinct prefix of the group's vectors gets a distinct non-zero code, and
// an input that already differs from all of them keeps code 0. At the last cell the
// prefix is the whole vector, so the code is the local address; last_offset is added
// to non-zero words there (the OR architecture stores global addresses).
// Vectors are at most 64 bits, MSB first (bit n-1 is x_1).
package ag_tb_pkg;
  import addr_gen_pkg::*;

  typedef logic [63:0] vec_t;

  function automatic vec_t prefix(vec_t v, int unsigned n, int unsigned bits);
    if (bits == 0) return '0;
    return v >> (n - bits);
  endfunction

  function automatic int unsigned cell_word(int unsigned n, int unsigned p, int unsigned r,
                                            int unsigned j, int unsigned a, input vec_t vecs[$],
                                            int unsigned last_offset);
    int unsigned s, xw, off, rail, res;
    vec_t xval, target;
    s    = num_levels(n, p, r);
    xw   = cell_x_width(n, p, r, j);
    off  = cell_x_offset(p, r, j);
    xval = vec_t'(a) & ((64'd1 << xw) - 1);
    rail = a >> xw;
    if (j == 0) begin
      target = xval;
    end else begin
      if (rail == 0 || rail > vecs.size()) return 0;
      target = (prefix(vecs[rail-1], n, off) << xw) | xval;
    end
    res = 0;
    foreach (vecs[i]) begin
      if (prefix(vecs[i], n, off + xw) == target) begin
        res = i + 1;
        break;
      end
    end
    if (res != 0 && j == s - 1) res += last_offset;
    return res;
  endfunction

  function automatic int unsigned ref_addr(input vec_t all[$], vec_t x);
    foreach (all[i]) if (all[i] == x) return i + 1;
    return 0;
  endfunction

  // Random n-bit vector.
  function automatic vec_t rand_vec(int unsigned n);
    vec_t v;
    v = {$urandom, $urandom};
    if (n < 64) v &= (64'd1 << n) - 1;
    return v;
  endfunction

endpackage
