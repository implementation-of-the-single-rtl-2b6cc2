// Full-size testbench for smq_alu at its default word length (N = 8,
// p = 257), with no parameter override on the design.
//
// Starts with hand-worked products, e.g. (1 + 2i)(3 + 4i) = -5 + 10i, which is
// 252 + 10i mod 257, and i * i = -1 = 256, then runs random operand pairs
// against the schoolbook product x1*x2 - y1*y2, x1*y2 + x2*y1 (mod p).
module tb_smq_alu_full;
  import smq_ref_pkg::*;

  localparam int unsigned N = smq_pkg::DEFAULT_N;
  localparam int ITER = 20000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N:0] x1, y1, x2, y2, x3, y3;

  smq_alu dut (.x1(x1), .y1(y1), .x2(x2), .y2(y2), .x3(x3), .y3(y3));

  initial begin : watchdog
    repeat (ITER + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input wide_t a1, b1, a2, b2, input wide_t ex, ey);
    x1 = (N+1)'(a1); y1 = (N+1)'(b1); x2 = (N+1)'(a2); y2 = (N+1)'(b2);
    @(posedge clk);
    checks++;
    if (wide_t'(x3) != ex || wide_t'(y3) != ey) begin
      failures++;
      if (failures < 10)
        $display("(%0d + i%0d)(%0d + i%0d) = %0d + i%0d, expected %0d + i%0d",
                 a1, b1, a2, b2, x3, y3, ex, ey);
    end
  endtask

  initial begin
    wide_t p, a1, b1, a2, b2;
    p = modulus(N);
    // hand-worked cases for p = 257
    apply(1, 2, 3, 4, 252, 10);
    apply(0, 1, 0, 1, 256, 0);
    apply(256, 0, 256, 0, 1, 0);
    apply(0, 256, 0, 256, 256, 0);
    apply(16, 0, 0, 16, 0, 256);
    for (int it = 0; it < ITER; it++) begin
      a1 = rand_below(p); b1 = rand_below(p);
      a2 = rand_below(p); b2 = rand_below(p);
      apply(a1, b1, a2, b2,
            sub_mod(mul_mod(a1, a2, p), mul_mod(b1, b2, p), p),
            add_mod(mul_mod(a1, b2, p), mul_mod(a2, b1, p), p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
