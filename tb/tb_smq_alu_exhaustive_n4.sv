// Exhaustive end-to-end test of smq_alu at N = 4 (p = 17), the smallest word
// length of the evaluated set: all 17^4 = 83521 operand combinations are
// compared with the schoolbook complex product modulo 17.
module tb_smq_alu_exhaustive_n4;
  localparam int unsigned N = 4;
  localparam int unsigned P = (1 << N) + 1;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N:0] x1, y1, x2, y2, x3, y3;

  smq_alu #(.N(N)) dut (.x1(x1), .y1(y1), .x2(x2), .y2(y2), .x3(x3), .y3(y3));

  initial begin : watchdog
    repeat (P * P * P * P + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ex, ey;
    for (int unsigned a = 0; a < P; a++)
      for (int unsigned b = 0; b < P; b++)
        for (int unsigned c = 0; c < P; c++)
          for (int unsigned d = 0; d < P; d++) begin
            x1 = (N+1)'(a); y1 = (N+1)'(b); x2 = (N+1)'(c); y2 = (N+1)'(d);
            @(posedge clk);
            ex = (a * c + P * P - b * d) % P;
            ey = (a * d + c * b) % P;
            checks++;
            if (x3 != (N+1)'(ex) || y3 != (N+1)'(ey)) begin
              failures++;
              if (failures < 10)
                $display("(%0d + i%0d)(%0d + i%0d) = %0d + i%0d, expected %0d + i%0d",
                         a, b, c, d, x3, y3, ex, ey);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
