// ITWOJ: multiply a residue by (2j)^-1 modulo p = 2^N + 1, with j = 2^(N/2).
//
// Split x = 2^(N/2+1) * xh + xl with xl the low N/2 + 1 bits and xh the upper
// N/2 bits.  Since 2j = 2^(N/2+1) and 2^N = -1,
//     x / (2j) = xh - 2^(N/2-1) * xl (mod p).
// The circuit zero-extends xh, places xl N/2 - 1 places up (a wiring shift),
// negates that word, and adds the two with the modulo-p adder.
//
// Interface: x (N+1 bits, < p) in; y (N+1 bits) out.
// Timing: purely combinational (one negator and one modulo-p adder).
module smq_itwoj #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x,
  output logic [N:0] y
);

  localparam int unsigned H = N / 2;

  logic [N:0] hi_ext;     // 0...0 | xh
  logic [N:0] lo_shift;   // 0 | xl | 0...0
  logic [N:0] neg_lo;

  always_comb begin
    hi_ext   = (N+1)'(x[N:H+1]);
    lo_shift = (N+1)'(x[H:0]) << (H - 1);
  end

  smq_neg #(.N(N)) u_neg (.x(lo_shift), .y(neg_lo));
  smq_ap  #(.N(N)) u_ap  (.a(hi_ext), .b(neg_lo), .s(y));

endmodule
