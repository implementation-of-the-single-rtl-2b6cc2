// MDL: modulo-p mapping unit of the modulo-p adder (p = 2^N + 1).
//
// Takes the raw sum S = A + B of two residues, split as an (N+1)-bit word x
// (bits 0..N of S) and the bit of weight 2^(N+1), mod.  S never exceeds 2^(N+1),
// so one subtraction of p is enough.  The unit reduces when S >= p, that is
// when mod is set or when x[N] is set together with any lower bit.
// Reduction is done by the mapping rule for Fermat moduli: from the LSB
// upward, complement every 0 up to and including the first 1, keep the bits
// above it, and clear the top bit.  This equals (S - 1) mod 2^N = S - p.
// Per bit k < N:  v_k = s_k XOR (s_0..s_{k-1} all zero), i.e.
//     v_k = ~s_0..~s_{k-1}~s_k + (s_0 + .. + s_{k-1}) s_k,   v_N = 0.
// A multiplexer then chooses the mapped word or x unchanged.
//
// Interface: x (N+1 bits), mod in; v (N+1 bits) out, v < p.
// Timing: purely combinational.
module smq_mdl #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x,
  input  logic       mod,
  output logic [N:0] v
);

  logic [N-1:0] mapped;    // lookup-table output, x - p on the low N bits
  logic         sel;       // 1: S >= p, take the mapped word

  always_comb begin
    logic lowzero;   // bits 0..k-1 of x are all zero
    lowzero = 1'b1;
    for (int k = 0; k < N; k++) begin
      mapped[k] = (x[k] & ~lowzero) | (~x[k] & lowzero);
      lowzero   = lowzero & ~x[k];
    end
    sel = mod | (x[N] & (|x[N-1:0]));
    v   = sel ? {1'b0, mapped} : x;
  end

endmodule
