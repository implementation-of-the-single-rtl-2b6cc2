// JX: multiply a residue by j = 2^(N/2), a square root of -1 modulo p = 2^N + 1.
//
// Split x = 2^(N/2) * xh + xl with xl the low N/2 bits and xh the upper
// N/2 + 1 bits.  Then j * x = 2^N * xh + 2^(N/2) * xl = 2^(N/2) * xl - xh
// (mod p), because 2^N = -1.  The circuit zero-extends xh and negates it,
// places xl N/2 places up (a wiring shift), and adds the two with the
// modulo-p adder.
//
// Interface: x (N+1 bits, < p) in; y (N+1 bits) out.
// Timing: purely combinational (one negator and one modulo-p adder).
module smq_jx #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x,
  output logic [N:0] y
);

  localparam int unsigned H = N / 2;

  logic [N:0] hi_ext;     // 0...0 | xh
  logic [N:0] lo_shift;   // 0 | xl | 0...0
  logic [N:0] neg_hi;

  always_comb begin
    hi_ext   = (N+1)'(x[N:H]);
    lo_shift = (N+1)'(x[H-1:0]) << H;
  end

  smq_neg #(.N(N)) u_neg (.x(hi_ext), .y(neg_hi));
  smq_ap  #(.N(N)) u_ap  (.a(lo_shift), .b(neg_hi), .s(y));

endmodule
