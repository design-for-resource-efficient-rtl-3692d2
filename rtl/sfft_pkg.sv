// sfft_pkg: constants and helper functions shared by the real-data sparse FFT
// datapath. Every partitioned memory in the design has eight banks, and a
// "woctad" is the eight-word group moved through such a memory in one clock.
// The dibit-reversal (radix-4 digit reversal) function is the input ordering
// required by the radix-4 decimation-in-time fast Hartley transform.
package sfft_pkg;

  // Number of banks of every partitioned memory (woctad = NBANK words).
  localparam int unsigned NBANK = 8;

  // Reverse the radix-4 digits of the low 'nbits' bits of idx (nbits even).
  function automatic int unsigned dbr(input int unsigned idx, input int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned d = 0; d < nbits / 2; d++) begin
      r = (r << 2) | ((idx >> (2 * d)) & 3);
    end
    return r;
  endfunction

  // Integer base-2 logarithm of a power of two.
  function automatic int unsigned ilog2(input longint unsigned v);
    int unsigned r;
    r = 0;
    while ((longint'(1) << r) < v) r++;
    return r;
  endfunction

endpackage
