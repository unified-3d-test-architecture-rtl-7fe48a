// Shared sizing rules and pointer arithmetic for the bandwidth adapters.
//
// Both adapters keep their data in a circular bit buffer of 2n-1 bits, where
// n is the width of the internal layer TAM. A pointer into that buffer always
// lies in 0 .. 2n-2, and every advance is taken modulo 2n-1. The helper
// functions below are pure combinational arithmetic and are used by
// bw_in_adapter and bw_out_adapter alike.
package bw_adapter_pkg;

  // Size of the circular buffer for a TAM of n bits: 2n-1 bits.
  function automatic int unsigned buf_bits(int unsigned n);
    return 2 * n - 1;
  endfunction

  // (a + b) mod m for a < m and b < m, i.e. at most one subtraction.
  function automatic int unsigned wrap_add(int unsigned a, int unsigned b, int unsigned m);
    int unsigned s;
    s = a + b;
    return (s >= m) ? s - m : s;
  endfunction

  // Distance from pointer p forward to position j, modulo m.
  function automatic int unsigned fwd_dist(int unsigned j, int unsigned p, int unsigned m);
    return (j >= p) ? j - p : j + m - p;
  endfunction

endpackage
