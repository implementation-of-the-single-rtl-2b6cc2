// Testbench for smq_itwo, multiplication by 2^-1 modulo p: every residue at
// N = 8 (p = 257) and N = 4 (p = 17), and random residues at N = 16.  The
// expected value is the product with the constant, whose inverse is found by
// Euclid's algorithm in the reference package, so that 2 * y = x (mod p).
module tb_smq_itwo;
  import smq_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [8:0]  x8,  y8;
  logic [4:0]  x4,  y4;
  logic [16:0] x16, y16;

  smq_itwo            dut8  (.x(x8),  .y(y8));
  smq_itwo #(.N(4))   dut4  (.x(x4),  .y(y4));
  smq_itwo #(.N(16))  dut16 (.x(x16), .y(y16));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned NN, input wide_t v, input wide_t got);
    wide_t p, e;
    p = modulus(NN);
    e = mul_mod(wide_t'(v), inv_mod(2, p), p);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("N=%0d itwo(%0d) = %0d, expected %0d", NN, v, got, e);
    end
  endtask

  initial begin
    for (int unsigned v = 0; v <= 256; v++) begin
      x8 = 9'(v);
      x4 = 5'(v % 17);
      x16 = (v == 0) ? 17'h10000 : 17'(rand_below(65537));
      @(posedge clk);
      check(8, wide_t'(v), wide_t'(y8));
      check(4, wide_t'(v % 17), wide_t'(y4));
      check(16, wide_t'(x16), wide_t'(y16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
