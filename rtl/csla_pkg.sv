// csla_pkg -- stage layout of the square-root carry-select adder.
//
// A square-root CSLA splits an N-bit addition into stages whose widths grow
// by one bit from the least-significant end, so that the later (wider)
// stages have finished their local carry work by the time the carry from
// the lower stages arrives. Stage 0 is a FIRST_W-bit ripple-carry adder;
// stage k (k >= 1) is a proposed CSLA of width k+1, i.e. 2, 3, 4, ...
// Stages are added while they fit; a final stage takes the bits that are
// left. For N=16 this is 2,2,3,4,5 (the 16-bit arrangement of the source
// design); for N=128 it is 2,2,3,...,15,7, which is this design's own
// extension of the rule to widths whose grouping is not published.
//
// All functions are constant functions, meant for elaboration.
package csla_pkg;

  // Width of stage k for an N-bit adder whose first stage is first_w bits.
  function automatic int unsigned stage_width(int unsigned n, int unsigned first_w,
                                              int unsigned k);
    int unsigned left;
    int unsigned w;
    left = n;
    w    = 0;
    for (int unsigned j = 0; j <= k; j++) begin
      if (j == 0)      w = (first_w < left) ? first_w : left;
      else if (left == 0) w = 0;
      else             w = (j + 1 < left) ? j + 1 : left;
      left -= w;
    end
    return w;
  endfunction

  // Bit position of the least-significant bit of stage k.
  function automatic int unsigned stage_lsb(int unsigned n, int unsigned first_w,
                                            int unsigned k);
    int unsigned pos;
    pos = 0;
    for (int unsigned j = 0; j < k; j++) pos += stage_width(n, first_w, j);
    return pos;
  endfunction

  // Number of stages, the ripple-carry stage included.
  function automatic int unsigned num_stages(int unsigned n, int unsigned first_w);
    int unsigned k;
    k = 0;
    while (stage_lsb(n, first_w, k) < n) k++;
    return k;
  endfunction

endpackage
