// Shared constants and helpers for the single-modulus QRNS (SM-QRNS) datapath.
//
// Every residue in this design lives in Z_p with the Fermat modulus
// p = 2^N + 1, N = 2^m.  A residue takes N+1 bits because the largest value,
// 2^N (which equals -1 mod p), needs the extra top bit.  All blocks are purely
// combinational and take the word length N as a parameter; the default of 8
// (p = 257) is the eight-bit design the gate-array study was built around.
package smq_pkg;

  // Default word length of the datapath (modulus p = 2^N + 1 = 257).
  localparam int unsigned DEFAULT_N = 8;

  // True when n is a power of two and at least 2, the word lengths for which
  // 2^n + 1 is a Fermat number and j = 2^(n/2) is a square root of -1.
  function automatic bit valid_n(input int unsigned n);
    return (n >= 2) && ((n & (n - 1)) == 0);
  endfunction

endpackage
