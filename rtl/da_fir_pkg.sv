// da_fir_pkg: types and helper functions shared by the distributed-arithmetic
// (DA) FIR filter. The filter computes y(n) = sum_k c[k] x(n-k) without
// multipliers: the input bits are read out one bit position per clock, the
// bit-slice addresses small LUTs of precomputed coefficient sums, and shifted
// accumulation rebuilds the product. The slice tag defined here travels down
// the pipeline next to each bit-slice so that every stage knows which slice
// of a sample it is holding.
package da_fir_pkg;

  // Control that accompanies one bit-slice through the pipeline.
  //   valid : the stage holds a real slice
  //   first : slice of the most significant bit of a section (r = 0)
  //   last  : slice of the least significant bit of a section (r = R-1)
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } slice_tag_t;

  // Width of an index that can take n values (at least one bit).
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Number of bits needed to add n values (ceil(log2 n), 0 for n = 1).
  function automatic int unsigned grow_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 0;
  endfunction

endpackage
