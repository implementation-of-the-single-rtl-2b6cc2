// Testbench for smq_sum, the N-bit carry-lookahead adder: all operand pairs
// and both carry-in values at N = 8, compared with integer addition.
module tb_smq_sum;
  localparam int unsigned N = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b, s;
  logic         cin, cout;

  smq_sum dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    for (int unsigned i = 0; i < (1 << N); i++)
      for (int unsigned k = 0; k < (1 << N); k++)
        for (int c = 0; c < 2; c++) begin
          a = N'(i); b = N'(k); cin = 1'(c);
          @(posedge clk);
          e = i + k + c;
          checks++;
          if ({cout, s} != (N+1)'(e)) begin
            failures++;
            if (failures < 10) $display("%0d + %0d + %0d = %0d, expected %0d", i, k, c, {cout, s}, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
