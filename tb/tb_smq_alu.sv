// End-to-end testbench for smq_alu, the SM-QRNS complex multiplier, at the
// word lengths the design is evaluated for, N = 4, 8 and 16, and at N = 32
// (composite modulus 2^32 + 1, also admissible).
//
// The expected result is the schoolbook complex product
//     x3 = x1*x2 - y1*y2,   y3 = x1*y2 + x2*y1   (mod p),
// computed with wide integers, independent of the QRNS mapping.  Half the
// operands are random; the other half are built from chosen QRNS values
// (0, 1, 2^N, 2^(N-1), random) so that the special paths of the datapath are
// reached.  For each case the testbench classifies, from its own forward
// mapping, which mechanisms the case exercises and counts them:
//   * multiplier exception: both operands 2^N / exactly one operand 2^N
//   * multiplier sign flip on the regular path
//   * modulo-p adder reducing a sum >= p, and reducing the largest sum 2^(N+1)
//   * negation of zero
//   * ITWO adding the 2^-1 constant (odd input)
// A mechanism that never occurs counts as a failure.
module tb_smq_alu;
  import smq_ref_pkg::*;

  localparam int ITER = 6000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  typedef enum int {
    M_BOTH, M_ONE, M_FLIP, M_REDUCE, M_TOPCARRY, M_NEGZERO, M_HALF, M_COUNT
  } mech_e;
  int unsigned seen [M_COUNT];

  logic [4:0]  x1_4,  y1_4,  x2_4,  y2_4,  x3_4,  y3_4;
  logic [8:0]  x1_8,  y1_8,  x2_8,  y2_8,  x3_8,  y3_8;
  logic [16:0] x1_16, y1_16, x2_16, y2_16, x3_16, y3_16;
  logic [32:0] x1_32, y1_32, x2_32, y2_32, x3_32, y3_32;

  smq_alu #(.N(4))  dut4  (.x1(x1_4),  .y1(y1_4),  .x2(x2_4),  .y2(y2_4),  .x3(x3_4),  .y3(y3_4));
  smq_alu #(.N(8))  dut8  (.x1(x1_8),  .y1(y1_8),  .x2(x2_8),  .y2(y2_8),  .x3(x3_8),  .y3(y3_8));
  smq_alu #(.N(16)) dut16 (.x1(x1_16), .y1(y1_16), .x2(x2_16), .y2(y2_16), .x3(x3_16), .y3(y3_16));
  smq_alu #(.N(32)) dut32 (.x1(x1_32), .y1(y1_32), .x2(x2_32), .y2(y2_32), .x3(x3_32), .y3(y3_32));

  initial begin : watchdog
    repeat (10 * ITER) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wide_t pick_z(input int unsigned n);
    wide_t p;
    p = modulus(n);
    case ($urandom_range(5))
      0: return 0;
      1: return 1;
      2, 3: return wide_t'(1) << n;
      4: return wide_t'(1) << (n - 1);
      default: return rand_below(p);
    endcase
  endfunction

  // Record which mechanisms the operands exercise, from the QRNS values.
  function automatic void classify(input int unsigned n, input wide_t x1, y1, x2, y2);
    wide_t p, j, top, half;
    wide_t z [4];
    wide_t m [2];
    wide_t jy [2];
    p    = modulus(n);
    j    = j_of(n);
    top  = wide_t'(1) << n;
    half = wide_t'(1) << (n - 1);
    jy[0] = mul_mod(j, y1, p);
    jy[1] = mul_mod(j, y2, p);
    z[0] = add_mod(x1, jy[0], p);
    z[1] = sub_mod(x1, jy[0], p);
    z[2] = add_mod(x2, jy[1], p);
    z[3] = sub_mod(x2, jy[1], p);
    for (int k = 0; k < 2; k++) begin
      wide_t a, b;
      a = z[k];
      b = z[k + 2];
      m[k] = mul_mod(a, b, p);
      if (a == top && b == top) seen[M_BOTH]++;
      else if ((a == top) != (b == top)) seen[M_ONE]++;
      else if (((a & half) != 0) != ((b & half) != 0)) seen[M_FLIP]++;
      if (x1 + jy[0] >= p || x2 + jy[1] >= p) seen[M_REDUCE]++;
      if (x1 + jy[0] == 2 * top || x2 + jy[1] == 2 * top) seen[M_TOPCARRY]++;
    end
    if (m[0] + m[1] >= p) seen[M_REDUCE]++;
    if (m[0] + m[1] == 2 * top) seen[M_TOPCARRY]++;
    if (m[1] == 0 || jy[0] == 0 || jy[1] == 0) seen[M_NEGZERO]++;
    if ((add_mod(m[0], m[1], p) & 1) != 0) seen[M_HALF]++;
  endfunction

  // Make one pair of operands for word length n.
  task automatic make_case(input int unsigned n, output wide_t x1, y1, x2, y2);
    wide_t p, i2, i2j;
    p = modulus(n);
    if ($urandom_range(1) == 0) begin
      x1 = rand_below(p); y1 = rand_below(p);
      x2 = rand_below(p); y2 = rand_below(p);
    end else begin
      wide_t za, zac, zb, zbc;
      za = pick_z(n); zac = pick_z(n); zb = pick_z(n); zbc = pick_z(n);
      i2  = inv_mod(2, p);
      i2j = inv_mod(2 * j_of(n), p);
      x1 = mul_mod(i2,  add_mod(za, zac, p), p);
      y1 = mul_mod(i2j, sub_mod(za, zac, p), p);
      x2 = mul_mod(i2,  add_mod(zb, zbc, p), p);
      y2 = mul_mod(i2j, sub_mod(zb, zbc, p), p);
    end
    classify(n, x1, y1, x2, y2);
  endtask

  task automatic check(input int unsigned n, input wide_t x1, y1, x2, y2, input wide_t gx, gy);
    wide_t p, ex, ey;
    p  = modulus(n);
    ex = sub_mod(mul_mod(x1, x2, p), mul_mod(y1, y2, p), p);
    ey = add_mod(mul_mod(x1, y2, p), mul_mod(x2, y1, p), p);
    checks++;
    if (gx != ex || gy != ey) begin
      failures++;
      if (failures < 10)
        $display("N=%0d (%0d + i%0d)(%0d + i%0d) = %0d + i%0d, expected %0d + i%0d",
                 n, x1, y1, x2, y2, gx, gy, ex, ey);
    end
  endtask

  initial begin
    wide_t a [4][4];
    foreach (seen[k]) seen[k] = 0;
    for (int it = 0; it < ITER; it++) begin
      make_case(4,  a[0][0], a[0][1], a[0][2], a[0][3]);
      make_case(8,  a[1][0], a[1][1], a[1][2], a[1][3]);
      make_case(16, a[2][0], a[2][1], a[2][2], a[2][3]);
      make_case(32, a[3][0], a[3][1], a[3][2], a[3][3]);
      {x1_4,  y1_4,  x2_4,  y2_4}  = {5'(a[0][0]),  5'(a[0][1]),  5'(a[0][2]),  5'(a[0][3])};
      {x1_8,  y1_8,  x2_8,  y2_8}  = {9'(a[1][0]),  9'(a[1][1]),  9'(a[1][2]),  9'(a[1][3])};
      {x1_16, y1_16, x2_16, y2_16} = {17'(a[2][0]), 17'(a[2][1]), 17'(a[2][2]), 17'(a[2][3])};
      {x1_32, y1_32, x2_32, y2_32} = {33'(a[3][0]), 33'(a[3][1]), 33'(a[3][2]), 33'(a[3][3])};
      @(posedge clk);
      check(4,  a[0][0], a[0][1], a[0][2], a[0][3], wide_t'(x3_4),  wide_t'(y3_4));
      check(8,  a[1][0], a[1][1], a[1][2], a[1][3], wide_t'(x3_8),  wide_t'(y3_8));
      check(16, a[2][0], a[2][1], a[2][2], a[2][3], wide_t'(x3_16), wide_t'(y3_16));
      check(32, a[3][0], a[3][1], a[3][2], a[3][3], wide_t'(x3_32), wide_t'(y3_32));
    end
    for (int k = 0; k < M_COUNT; k++) begin
      $display("mechanism %s: %0d", mech_e'(k), seen[k]);
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("mechanism %s never exercised", mech_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
