// MUTT: multiplier modulo p = 2^N + 1.
//
// Returns (a * b) mod p for residues a, b in [0, 2^N].
// Three cases are decoded from the top bits a[N], b[N]:
//   * both operands equal 2^N (= -1): the product is 1;
//   * exactly one equals 2^N: the product is the negation of the other;
//   * neither: the regular path below.
// Regular path: an operand whose bit N-1 is set (value >= 2^(N-1)) is first
// replaced by its negation p - a, which still fits in N bits; the sign flips
// are remembered as the XOR of the two bit-(N-1) values.  The N x N unsigned
// multiplier gives P = PH * 2^N + PL, and since 2^N = -1 mod p the residue is
// PL - PH, formed by negating PH and adding with the modulo-p adder.  When the
// sign flag is set the result is negated once more.
// The two operand negators are shared with the exception path (a multiplexer
// on a[N] picks -b or -a).  The three sources drive the output through a
// priority multiplexer; the original shares one bus among three enabled
// buffers, which is not synthesizable logic here.
//
// Interface: a, b (N+1 bits, each < p) in; p (N+1 bits) out.
// Timing: purely combinational.
module smq_mutt #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] p
);

  logic [N:0]     neg_a, neg_b;     // -a, -b (low N bits only are used)
  logic [N-1:0]   mag_a, mag_b;     // operands after conditional negation
  logic           flip;             // result must be negated
  logic [2*N-1:0] prod;             // unsigned product of the magnitudes
  logic [N:0]     neg_hi;           // -PH
  logic [N:0]     folded;           // (PL - PH) mod p
  logic [N:0]     neg_folded;
  logic [N:0]     regular;          // result of the regular path
  logic [N:0]     one_special;      // result when exactly one operand is 2^N

  smq_neg #(.N(N)) u_neg_a (.x({1'b0, a[N-1:0]}), .y(neg_a));
  smq_neg #(.N(N)) u_neg_b (.x({1'b0, b[N-1:0]}), .y(neg_b));

  always_comb begin
    mag_a = a[N-1] ? neg_a[N-1:0] : a[N-1:0];
    mag_b = b[N-1] ? neg_b[N-1:0] : b[N-1:0];
    flip  = a[N-1] ^ b[N-1];
  end

  smq_mul #(.N(N)) u_mul (.a(mag_a), .b(mag_b), .p(prod));

  smq_neg #(.N(N)) u_neg_hi (.x({1'b0, prod[2*N-1:N]}), .y(neg_hi));

  smq_ap #(.N(N)) u_ap (.a({1'b0, prod[N-1:0]}), .b(neg_hi), .s(folded));

  smq_neg #(.N(N)) u_neg_res (.x(folded), .y(neg_folded));

  always_comb begin
    regular     = flip ? neg_folded : folded;
    one_special = a[N] ? neg_b : neg_a;
    unique case ({a[N], b[N]})
      2'b11:        p = (N+1)'(1);
      2'b10, 2'b01: p = one_special;
      default:      p = regular;
    endcase
  end

endmodule
