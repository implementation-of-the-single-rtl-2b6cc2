// Testbench for smq_ap, the modulo-p adder: every pair of residues at N = 8
// (p = 257), and every pair at N = 4 (p = 17), against (a + b) % p.
module tb_smq_ap;
  localparam int unsigned NA = 8;
  localparam int unsigned NB = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NA:0] aa, ba, sa;
  logic [NB:0] ab, bb, sb;

  smq_ap            dut_a (.a(aa), .b(ba), .s(sa));
  smq_ap #(.N(NB))  dut_b (.a(ab), .b(bb), .s(sb));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pa, pb;
    pa = (1 << NA) + 1;
    pb = (1 << NB) + 1;
    for (int unsigned i = 0; i < pa; i++)
      for (int unsigned k = 0; k < pa; k++) begin
        aa = (NA+1)'(i); ba = (NA+1)'(k);
        ab = (NB+1)'(i % pb); bb = (NB+1)'(k % pb);
        #1;
        checks++;
        if (sa != (NA+1)'((i + k) % pa)) begin
          failures++;
          if (failures < 10) $display("N=%0d %0d + %0d = %0d", NA, i, k, sa);
        end
        checks++;
        if (sb != (NB+1)'(((i % pb) + (k % pb)) % pb)) begin
          failures++;
          if (failures < 10) $display("N=%0d %0d + %0d = %0d", NB, i % pb, k % pb, sb);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
