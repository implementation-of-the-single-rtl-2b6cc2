// Testbench for smq_mdl, the modulo-p mapping unit: every raw sum S of two
// residues, 0..2^(N+1), is split into x = S[N:0] and mod = S[N+1]; the output
// must be S mod p.  Counts how many inputs took the reducing path.
module tb_smq_mdl;
  localparam int unsigned N = 8;
  localparam int unsigned P = (1 << N) + 1;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N:0] x, v;
  logic       mod;

  smq_mdl dut (.x(x), .mod(mod), .v(v));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned reduced = 0;
    for (int unsigned s = 0; s <= (1 << (N + 1)); s++) begin
      {mod, x} = (N+2)'(s);
      @(posedge clk);
      checks++;
      if (s >= P) reduced++;
      if (v != (N+1)'(s % P)) begin
        failures++;
        if (failures < 10) $display("mdl(%0d) = %0d, expected %0d", s, v, s % P);
      end
    end
    checks++;
    if (reduced != (1 << (N + 1)) - P + 1) begin
      failures++;
      $display("reducing path taken %0d times, expected %0d", reduced, (1 << (N + 1)) - P + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
