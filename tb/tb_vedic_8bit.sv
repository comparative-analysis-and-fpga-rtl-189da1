// tb_vedic_8bit: self-check of the 8x8-bit Vedic multiplier in both
// adder variants, ripple-carry and Kogge-Stone, instantiated side by side.
// The published 8-bit simulation vectors come first, then all 65536 pairs.
// Each product is compared with the integer product a * b. A watchdog ends
// the run if it stalls.
module tb_vedic_8bit;
  import vedic_pkg::*;

  logic [8-1:0]   a, b;
  logic [2*8-1:0] mul_rca, mul_ksa;
  int              checks = 0, failures = 0;

  vedic_8bit #(.KIND(ADDER_RCA)) dut_rca (.a(a), .b(b), .mul(mul_rca));
  vedic_8bit #(.KIND(ADDER_KSA)) dut_ksa (.a(a), .b(b), .mul(mul_ksa));

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [8-1:0] x, input logic [8-1:0] y);
    logic [2*8-1:0] expected;
    a = x;
    b = y;
    #1;
    expected = (2*8)'(x) * (2*8)'(y);
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
  task automatic apply_known(input logic [8-1:0] x, input logic [8-1:0] y,
                             input logic [2*8-1:0] product);
    apply(x, y);
    checks += 2;
    if (mul_rca !== product || mul_ksa !== product) begin
      failures++;
      $display("FAIL %0d * %0d: rca %0d ksa %0d, expected %0d", x, y, mul_rca, mul_ksa, product);
    end
  endtask

  initial begin
    // the operand pairs and products of the published 8-bit simulation
    apply_known(8'd0,   8'd34,  16'd0);
    apply_known(8'd202, 8'd0,   16'd0);
    apply_known(8'd170, 8'd170, 16'd28900);
    apply_known(8'd170, 8'd85,  16'd14450);
    apply_known(8'd85,  8'd85,  16'd7225);
    apply_known(8'd85,  8'd170, 16'd14450);
    apply_known(8'd245, 8'd255, 16'd62475);
    apply_known(8'd255, 8'd190, 16'd48450);
    // every operand pair
    for (int x = 0; x < (1 << 8); x++)
      for (int y = 0; y < (1 << 8); y++)
        apply(8'(x), 8'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
