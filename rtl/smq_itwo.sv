// ITWO: multiply a residue by 2^-1 = 2^(N-1) + 1 modulo p = 2^N + 1.
//
// Split x = 2 * xh + xl with xl the least significant bit.  Then
// x / 2 = xh + xl * (2^(N-1) + 1) (mod p): a right shift, plus the constant
// 2^-1 when the dropped bit was one.  A multiplexer steered by xl selects the
// constant or zero, and the modulo-p adder adds it to the shifted word.
//
// Interface: x (N+1 bits, < p) in; y (N+1 bits) out.
// Timing: purely combinational (one multiplexer and one modulo-p adder).
module smq_itwo #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N:0] x,
  output logic [N:0] y
);

  localparam logic [N:0] HALF = (N+1)'((1 << (N - 1)) + 1);   // 2^-1 mod p

  logic [N:0] hi_ext;   // 0 | xh
  logic [N:0] addend;   // 2^-1 or 0

  always_comb begin
    hi_ext = (N+1)'(x[N:1]);
    addend = x[0] ? HALF : '0;
  end

  smq_ap #(.N(N)) u_ap (.a(hi_ext), .b(addend), .s(y));

endmodule
