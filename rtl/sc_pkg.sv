// sc_pkg: helpers shared by the stochastic-computing divider and the
// Retinex datapath built around it.
//
// bit_reverse() mirrors the low `width` bits of a value. Applied to a
// counter it yields the van der Corput sequence 0, N/2, N/4, 3N/4, ...,
// which visits every number 0..N-1 once per period of N = 2^width and
// spreads each threshold's hits evenly over the period. The stochastic
// number generator uses it as its (quasi-)random source.
package sc_pkg;

  function automatic logic [15:0] bit_reverse(input logic [15:0] v, input int unsigned width);
    logic [15:0] r;
    r = '0;
    for (int unsigned i = 0; i < 16; i++) begin
      if (i < width) r[i] = v[width - 1 - i];
    end
    return r;
  endfunction

endpackage
