// tb_vedic_16bit: self-check of the 16x16-bit Vedic multiplier in both
// adder variants, ripple-carry and Kogge-Stone, instantiated side by side.
// The published 16-bit simulation vectors come first, then walking ones,
// corner values and 200000 random pairs.
// Each product is compared with the integer product a * b. A watchdog ends
// the run if it stalls.
module tb_vedic_16bit;
  import vedic_pkg::*;

  logic [16-1:0]   a, b;
  logic [2*16-1:0] mul_rca, mul_ksa;
  int              checks = 0, failures = 0;

  vedic_16bit #(.KIND(ADDER_RCA)) dut_rca (.a(a), .b(b), .mul(mul_rca));
  vedic_16bit #(.KIND(ADDER_KSA)) dut_ksa (.a(a), .b(b), .mul(mul_ksa));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [16-1:0] x, input logic [16-1:0] y);
    logic [2*16-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*16)'(x) * (2*16)'(y);
    checks += 2;
    if (mul_rca !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL rca %0d * %0d gave %0d", x, y, mul_rca);
    end
    if (mul_ksa !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL ksa %0d * %0d gave %0d", x, y, mul_ksa);
    end
  endtask

  // apply a pair whose product is given as a constant, not computed here
  task automatic apply_known(input logic [16-1:0] x, input logic [16-1:0] y,
                             input logic [2*16-1:0] product);
    apply(x, y);
    checks += 2;
    if (mul_rca !== product || mul_ksa !== product) begin
      failures++;
      $display("FAIL %0d * %0d: rca %0d ksa %0d, expected %0d", x, y, mul_rca, mul_ksa, product);
    end
  endtask

  initial begin
    // the operand pairs and products of the published 16-bit simulation
    apply_known(16'd0,     16'd46636, 32'd0);
    apply_known(16'd51963, 16'd0,     32'd0);
    apply_known(16'd43690, 16'd43690, 32'd1908816100);
    apply_known(16'd43690, 16'd21845, 32'd954408050);
    apply_known(16'd21845, 16'd21845, 32'd477204025);
    apply_known(16'd21845, 16'd43690, 32'd954408050);
    apply_known(16'd56657, 16'd65535, 32'd3713016495);
    apply_known(16'd65535, 16'd30160, 32'd1976535600);
    // walking ones, all ones, and random operands
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1) << i, 16'(1) << j);
    apply('1, '1);
    apply('1, '0);
    for (int n = 0; n < 200000; n++)
      apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
