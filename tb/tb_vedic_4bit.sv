// tb_vedic_4bit: self-check of the 4x4-bit Vedic multiplier in both
// adder variants, ripple-carry and Kogge-Stone, instantiated side by side.
// Every one of the 256 operand pairs is applied.
// Each product is compared with the integer product a * b. A watchdog ends
// the run if it stalls.
module tb_vedic_4bit;
  import vedic_pkg::*;

  logic [4-1:0]   a, b;
  logic [2*4-1:0] mul_rca, mul_ksa;
  int              checks = 0, failures = 0;

  vedic_4bit #(.KIND(ADDER_RCA)) dut_rca (.a(a), .b(b), .mul(mul_rca));
  vedic_4bit #(.KIND(ADDER_KSA)) dut_ksa (.a(a), .b(b), .mul(mul_ksa));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [4-1:0] x, input logic [4-1:0] y);
    logic [2*4-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*4)'(x) * (2*4)'(y);
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
  task automatic apply_known(input logic [4-1:0] x, input logic [4-1:0] y,
                             input logic [2*4-1:0] product);
    apply(x, y);
    checks += 2;
    if (mul_rca !== product || mul_ksa !== product) begin
      failures++;
      $display("FAIL %0d * %0d: rca %0d ksa %0d, expected %0d", x, y, mul_rca, mul_ksa, product);
    end
  endtask

  initial begin
    apply_known(4'd15, 4'd15, 8'd225);
    apply_known(4'd13, 4'd11, 8'd143);
    // every operand pair
    for (int x = 0; x < (1 << 4); x++)
      for (int y = 0; y < (1 << 4); y++)
        apply(4'(x), 4'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
