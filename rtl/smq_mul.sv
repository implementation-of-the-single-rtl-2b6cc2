// MUL: carry-save unsigned N x N multiplier.
//
// Forms the 2N-bit product of two N-bit unsigned words.  The partial product
// rows a & b[i], shifted left by i, are accumulated one row at a time in
// carry-save form: each row passes through a row of full adders that
// produces a new sum vector and a new (left-shifted) carry vector without
// propagating carries along the row.  A final ripple-carry adder merges the
// sum and carry vectors into the product.  The row-by-row array and the
// ripple merge are this design's choice; only "carry-save unsigned
// multiplier" is given for the block.
//
// Interface: a, b (N bits) in; p (2N bits) out.
// Timing: purely combinational; the critical path runs through N rows of
// full adders and the merging adder.
module smq_mul #(
  parameter int unsigned N = smq_pkg::DEFAULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] sv;   // carry-save sum vector
  logic [2*N-1:0] cv;   // carry-save carry vector

  always_comb begin
    logic [2*N-1:0] pp;
    logic [2*N-1:0] ns;
    logic [2*N-1:0] nc;
    logic           rc;
    sv = '0;
    cv = '0;
    for (int i = 0; i < N; i++) begin
      pp = (2*N)'(a & {N{b[i]}}) << i;
      ns = sv ^ cv ^ pp;
      nc = ((sv & cv) | (sv & pp) | (cv & pp)) << 1;
      sv = ns;
      cv = nc;
    end
    // carry-propagate merge of the two vectors
    rc = 1'b0;
    for (int k = 0; k < 2*N; k++) begin
      p[k] = sv[k] ^ cv[k] ^ rc;
      rc   = (sv[k] & cv[k]) | (sv[k] & rc) | (cv[k] & rc);
    end
  end

endmodule
