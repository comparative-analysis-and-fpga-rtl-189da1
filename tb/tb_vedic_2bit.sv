// tb_vedic_2bit: exhaustive self-check of the 2x2-bit Vedic multiplier.
// All 16 operand pairs are applied and mul is compared with a * b.
// A watchdog ends the run if it stalls.
module tb_vedic_2bit;
  logic [1:0] a, b;
  logic [3:0] mul;
  int         checks = 0, failures = 0;

  vedic_2bit dut (.a(a), .b(b), .mul(mul));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (mul !== 4'(a) * 4'(b)) begin
        failures++;
        $display("FAIL %0d * %0d gave %0d", a, b, mul);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
