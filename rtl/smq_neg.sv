// NEG: negation modulo p = 2^N + 1.
//
// For a residue x in [0, 2^N] the result is (p - x) mod p.  The circuit
// follows the negator of the SM-QRNS datapath: the input bits are
// complemented, a small "lookup" network turns the complemented word into
// p - x, and the result is gated to zero by the OR of all input bits, so that
// -0 = 0.  The lookup network uses the identity
//     p - x = (~x + 2 + 2^N) mod 2^(N+1)        for 1 <= x <= 2^N,
// i.e. add two to the complemented word and flip its top bit.  Writing that
// network as an add-two plus a top-bit flip, rather than as a PLA of
// product terms, is this design's own choice.
//
// Interface: x (N+1 bits, must be < p) in, y (N+1 bits) out.
// Timing: purely combinational, no clock.
module smq_neg #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x,
  output logic [N:0] y
);

  if (!smq_pkg::valid_n(N)) begin : g_bad_n
    $error("smq_neg: N must be a power of two and at least 2");
  end

  logic       nonzero;   // OR of all input bits
  logic [N:0] xc;        // complemented input
  logic [N:0] tbl;       // p - x for nonzero x

  always_comb begin
    nonzero = |x;
    xc      = ~x;
    tbl     = xc + (N+1)'(2);
    tbl[N]  = ~tbl[N];
    y       = tbl & {(N+1){nonzero}};
  end

endmodule
