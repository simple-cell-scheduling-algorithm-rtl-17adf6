// sma_pkg: constants and helper functions shared by the SMA (simple matching
// algorithm) scheduler and the dual-plane input/output buffered cell switch.
//
// Indices in the RTL are 0-based. Port i (1-based) of the algorithm's
// description is index i-1 here, and a pointer value p in 1..N is stored as
// p-1 in 0..N-1.
//
// Initial pointer values. For plane 1 the ARP of input i and the GRP of output
// j start at N-(i-1) and N-(j-1); for plane 2 they start at N/2-(i-1) and
// N/2-(j-1), modulo N. Both follow one rule, value = BASE-(idx-1) mod N with
// BASE = N (plane 1) or BASE = N/2 (plane 2). In 0-based form that is
// (BASE-1-idx) mod N, which init_pointer() returns.
package sma_pkg;

  // 0-based initial pointer value for element idx (0-based) of a plane whose
  // base value is base, in a switch with n ports.
  function automatic int unsigned init_pointer(int base, int idx, int n);
    int v;
    v = (base - 1 - idx) % n;
    if (v < 0) v += n;
    return v;
  endfunction

  // Width of an index into n elements, at least 1 bit.
  function automatic int unsigned idx_width(int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
