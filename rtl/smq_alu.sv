// SM-QRNS complex ALU: product of two Gaussian integers modulo p = 2^N + 1.
//
// Operands are x1 + i*y1 and x2 + i*y2 with every part a residue in [0, 2^N].
// Because p = 2^N + 1 is a Fermat number, j = 2^(N/2) satisfies j^2 = -1 mod p,
// so each complex operand maps to a pair of independent residues
//     z = x + j*y,   z* = x - j*y       (mod p)
// and a complex product needs only two modulo-p multiplications:
//     M1 = z1 * z2,  M2 = z1* * z2*.
// The result maps back with
//     x3 = 2^-1 (M1 + M2),   y3 = (2j)^-1 (M1 - M2)   (mod p).
// Every constant is a power of two, so the scalings are shifts plus a
// negator and a modulo-p adder.  The datapath below is, stage by stage:
//   JX and NEG on y1 and y2;  four AP adders forming z1, z1*, z2, z2*;
//   two MUTT multipliers;  NEG on M2;  two AP adders;  ITWO and ITWOJ.
//
// Interface: x1, y1, x2, y2 (N+1 bits each, < p) in; x3, y3 (N+1 bits) out.
// Timing: purely combinational, no clock and no registers; an operand change
// settles through scaling, forward mapping, multiplication and inverse mapping.
module smq_alu #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x1,
  input  logic [N:0] y1,
  input  logic [N:0] x2,
  input  logic [N:0] y2,
  output logic [N:0] x3,
  output logic [N:0] y3
);

  logic [N:0] jy1, jy2;          // j*y
  logic [N:0] njy1, njy2;        // -j*y
  logic [N:0] z1, z1c, z2, z2c;  // A1..A4: forward-mapped operands
  logic [N:0] m1, m2;            // QRNS products
  logic [N:0] nm2;
  logic [N:0] sum_m, dif_m;

  // forward mapping, operand 1
  smq_jx  #(.N(N)) u_jx1   (.x(y1), .y(jy1));
  smq_neg #(.N(N)) u_neg1  (.x(jy1), .y(njy1));
  smq_ap  #(.N(N)) u_ap_z1 (.a(x1), .b(jy1),  .s(z1));
  smq_ap  #(.N(N)) u_ap_c1 (.a(x1), .b(njy1), .s(z1c));

  // forward mapping, operand 2
  smq_jx  #(.N(N)) u_jx2   (.x(y2), .y(jy2));
  smq_neg #(.N(N)) u_neg2  (.x(jy2), .y(njy2));
  smq_ap  #(.N(N)) u_ap_z2 (.a(x2), .b(jy2),  .s(z2));
  smq_ap  #(.N(N)) u_ap_c2 (.a(x2), .b(njy2), .s(z2c));

  // QRNS products: two independent modulo-p multiplications
  smq_mutt #(.N(N)) u_mp1 (.a(z1),  .b(z2),  .p(m1));
  smq_mutt #(.N(N)) u_mp2 (.a(z1c), .b(z2c), .p(m2));

  // inverse mapping
  smq_neg   #(.N(N)) u_neg_m2 (.x(m2), .y(nm2));
  smq_ap    #(.N(N)) u_ap_re  (.a(m1), .b(m2),  .s(sum_m));
  smq_ap    #(.N(N)) u_ap_im  (.a(m1), .b(nm2), .s(dif_m));
  smq_itwo  #(.N(N)) u_itwo   (.x(sum_m), .y(x3));
  smq_itwoj #(.N(N)) u_itwoj  (.x(dif_m), .y(y3));

endmodule
