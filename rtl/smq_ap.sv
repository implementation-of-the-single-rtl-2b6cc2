// AP: adder modulo p = 2^N + 1.
//
// Adds two residues a, b in [0, 2^N] and returns (a + b) mod p.  The low N
// bits go through the N-bit carry-lookahead adder (SUM).  The two top bits
// a[N], b[N] go through a one-bit adder cell: its carry is the bit of weight
// 2^(N+1) of the raw sum (the "mod" signal), and its sum, ORed with the
// overflow of the low adder, is the bit of weight 2^N.  The OR is exact: an
// operand with its top bit set is 2^N, whose low bits are zero, so the low
// adder cannot overflow at the same time.  The MDL mapping unit then
// subtracts p once if the raw sum is p or more.  The structure follows the
// published adder; the adder cell's carry input, which is not shown, is tied
// to zero here.
//
// Interface: a, b (N+1 bits, each < p) in; s (N+1 bits) out.
// Timing: purely combinational.
module smq_ap #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s
);

  logic [N-1:0] low_sum;
  logic         ovf;
  logic         top_sum;
  logic         top_carry;

  smq_sum #(.N(N)) u_sum (
    .a   (a[N-1:0]),
    .b   (b[N-1:0]),
    .cin (1'b0),
    .s   (low_sum),
    .cout(ovf)
  );

  // adder cell for the 2^N column, then the OR with the low overflow
  always_comb begin
    top_sum   = (a[N] ^ b[N]) | ovf;
    top_carry = a[N] & b[N];
  end

  smq_mdl #(.N(N)) u_mdl (
    .x  ({top_sum, low_sum}),
    .mod(top_carry),
    .v  (s)
  );

endmodule
