// Testbench for smq_mutt, the modulo-p multiplier: every pair of residues at
// N = 8 (p = 257) against (a * b) % p, plus random pairs at N = 16
// (p = 65537).  Counts the operand classes the circuit decodes (both operands
// 2^N, one operand 2^N, sign flip on the regular path) and fails if one of
// them never occurred.
module tb_smq_mutt;
  import smq_ref_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned NW = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N:0]  a, b, p;
  logic [NW:0] aw, bw, pw;

  smq_mutt            dut   (.a(a),  .b(b),  .p(p));
  smq_mutt #(.N(NW))  dut_w (.a(aw), .b(bw), .p(pw));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t pm, pmw, e;
    int unsigned n_both = 0, n_one = 0, n_flip = 0;
    pm  = modulus(N);
    pmw = modulus(NW);
    for (int unsigned i = 0; i < pm; i++)
      for (int unsigned k = 0; k < pm; k++) begin
        a = (N+1)'(i); b = (N+1)'(k);
        aw = (NW+1)'(rand_below(pmw));
        bw = (NW+1)'(rand_below(pmw));
        if (k == 0) aw = (NW+1)'(1 << NW);
        if (i == 0 && k < 3) bw = (NW+1)'(1 << NW);
        #1;
        if (a[N] && b[N]) n_both++;
        else if (a[N] ^ b[N]) n_one++;
        else if (a[N-1] ^ b[N-1]) n_flip++;
        e = mul_mod(wide_t'(i), wide_t'(k), pm);
        checks++;
        if (wide_t'(p) != e) begin
          failures++;
          if (failures < 10) $display("N=%0d %0d * %0d = %0d, expected %0d", N, i, k, p, e);
        end
        e = mul_mod(wide_t'(aw), wide_t'(bw), pmw);
        checks++;
        if (wide_t'(pw) != e) begin
          failures++;
          if (failures < 10) $display("N=%0d %0d * %0d = %0d, expected %0d", NW, aw, bw, pw, e);
        end
      end
    $display("cases: both 2^N %0d, one 2^N %0d, sign flip %0d", n_both, n_one, n_flip);
    checks += 3;
    if (n_both == 0) failures++;
    if (n_one  == 0) failures++;
    if (n_flip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
