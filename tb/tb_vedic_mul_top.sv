// tb_vedic_mul_top: end-to-end test of the top, both 16x16-bit multipliers.
//
// Applies the operand pairs of the published 16-bit simulation (with the
// products as constants), then corner values and random pairs, and checks
// both the ripple-carry and the Kogge-Stone product against a * b.
// It also counts how often the cases that exercise the multiplier tree
// occurred, and fails if one never did:
//   zero        - a zero operand, so every partial product is zero;
//   top_bit     - a product with bit 31 set (the high partial product q3
//                 reaches the top of the result);
//   upper_carry - the last 24-bit adder carries out of its low 16 bits into
//                 the bits that come from q3 (the crosswise sum overflows the
//                 middle columns), seen on both variants' internal signals;
//   max         - 65535 * 65535, the largest product.
// A watchdog ends the run if it stalls. The top has no parameters, so this
// is also the full-size test.
module tb_vedic_mul_top;
  logic [15:0] a, b;
  logic [31:0] mul_rca, mul_ksa;
  int          checks = 0, failures = 0;
  int          n_zero = 0, n_top_bit = 0, n_upper_carry = 0, n_max = 0;

  vedic_mul_top dut (.a(a), .b(b), .mul_rca(mul_rca), .mul_ksa(mul_ksa));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] expected;
    a = x;
    b = y;
    #1;
    expected = 32'(x) * 32'(y);
    checks += 2;
    if (mul_rca !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL rca %0d * %0d gave %0d", x, y, mul_rca);
    end
    if (mul_ksa !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL ksa %0d * %0d gave %0d", x, y, mul_ksa);
    end
    if (x == 0 || y == 0) n_zero++;
    if (expected[31]) n_top_bit++;
    if (dut.u_mul_rca.q6[23:16] != dut.u_mul_rca.q5[23:16] &&
        dut.u_mul_ksa.q6[23:16] != dut.u_mul_ksa.q5[23:16]) n_upper_carry++;
    if (x == 16'hffff && y == 16'hffff) n_max++;
  endtask

  task automatic apply_known(input logic [15:0] x, input logic [15:0] y,
                             input logic [31:0] product);
    apply(x, y);
    checks++;
    if (mul_rca !== product || mul_ksa !== product) begin
      failures++;
      $display("FAIL %0d * %0d: rca %0d ksa %0d, expected %0d", x, y, mul_rca, mul_ksa, product);
    end
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("%s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    // published 16-bit simulation vectors
    apply_known(16'd0,     16'd46636, 32'd0);
    apply_known(16'd51963, 16'd0,     32'd0);
    apply_known(16'd43690, 16'd43690, 32'd1908816100);
    apply_known(16'd43690, 16'd21845, 32'd954408050);
    apply_known(16'd21845, 16'd21845, 32'd477204025);
    apply_known(16'd21845, 16'd43690, 32'd954408050);
    apply_known(16'd56657, 16'd65535, 32'd3713016495);
    apply_known(16'd65535, 16'd30160, 32'd1976535600);
    // corners
    apply_known(16'hffff, 16'hffff, 32'hfffe0001);
    apply_known(16'hffff, 16'd1,    32'h0000ffff);
    apply_known(16'h8000, 16'h8000, 32'h40000000);
    // random pairs
    for (int n = 0; n < 100000; n++) apply(16'($urandom), 16'($urandom));

    require("zero", n_zero);
    require("top_bit", n_top_bit);
    require("upper_carry", n_upper_carry);
    require("max", n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
