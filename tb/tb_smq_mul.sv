// Testbench for smq_mul, the carry-save unsigned multiplier: every pair of
// 8-bit operands, plus random 16-bit operands on a second instance.
module tb_smq_mul;
  localparam int unsigned N  = 8;
  localparam int unsigned NW = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic [NW-1:0]   aw, bw;
  logic [2*NW-1:0] pw;

  smq_mul            dut   (.a(a),  .b(b),  .p(p));
  smq_mul #(.N(NW))  dut_w (.a(aw), .b(bw), .p(pw));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < (1 << N); i++)
      for (int unsigned k = 0; k < (1 << N); k++) begin
        a = N'(i); b = N'(k);
        aw = NW'($urandom); bw = NW'($urandom);
        #1;
        checks++;
        if (p != (2*N)'(i * k)) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d", i, k, p);
        end
        checks++;
        if (pw != (2*NW)'(64'(aw) * 64'(bw))) begin
          failures++;
          if (failures < 10) $display("%0d * %0d = %0d", aw, bw, pw);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
