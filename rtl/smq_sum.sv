// SUM: N-bit carry-lookahead adder.
//
// Adds two N-bit words and a carry in.  Each bit forms a generate
// g = a & b and a propagate p = a ^ b; the carry into bit i is computed
// directly from the generates and propagates of all lower bits (a flat
// lookahead, no rippling through the sum bits), and the sum bit is p ^ c.
// The carry out of the top bit is the overflow (OVF) used by the modulo-p
// adder.  The flat lookahead form is this design's choice; only "carry
// lookahead" is given for the block.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out.
// Timing: purely combinational.
module smq_sum #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] g, p;
  logic [N:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    for (int i = 0; i < N; i++) begin
      // carry into bit i+1: any lower generate whose propagate chain reaches
      // bit i, or the carry in propagated through bits 0..i
      logic term;
      logic chain;
      term  = 1'b0;
      chain = cin;
      for (int k = 0; k <= i; k++) begin
        chain = chain & p[k];
      end
      term = chain;
      for (int j = 0; j <= i; j++) begin
        logic prop;
        prop = g[j];
        for (int k = j + 1; k <= i; k++) begin
          prop = prop & p[k];
        end
        term = term | prop;
      end
      c[i+1] = term;
    end
    s    = p ^ c[N-1:0];
    cout = c[N];
  end

endmodule
