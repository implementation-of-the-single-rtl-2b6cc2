// Testbench for smq_neg: every residue 0..p-1 at the default word length
// (N = 8, p = 257) and at N = 4 (p = 17); the result must satisfy
// x + y = 0 (mod p) and y < p.  The two instances check the default and one
// overridden size.
module tb_smq_neg;
  import smq_ref_pkg::*;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NA:0] xa, ya;
  logic [NB:0] xb, yb;

  smq_neg              dut_a (.x(xa), .y(ya));
  smq_neg #(.N(NB))    dut_b (.x(xb), .y(yb));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t p, e;
    p = modulus(NA);
    for (int unsigned v = 0; v < p; v++) begin
      xa = (NA+1)'(v);
      @(posedge clk);
      e = sub_mod(0, wide_t'(v), p);
      checks++;
      if (wide_t'(ya) != e) begin
        failures++;
        if (failures < 10) $display("N=%0d neg(%0d) = %0d, expected %0d", NA, v, ya, e);
      end
    end
    p = modulus(NB);
    for (int unsigned v = 0; v < p; v++) begin
      xb = (NB+1)'(v);
      @(posedge clk);
      e = sub_mod(0, wide_t'(v), p);
      checks++;
      if (wide_t'(yb) != e) begin
        failures++;
        if (failures < 10) $display("N=%0d neg(%0d) = %0d, expected %0d", NB, v, yb, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
