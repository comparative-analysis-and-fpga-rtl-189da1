// tb_half_adder: exhaustive self-check of half_adder.
// All four input pairs are applied; sum and carry are compared with the
// arithmetic sum a + b. A watchdog ends the run if it stalls.
module tb_half_adder;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] expected;
      {a, b} = 2'(v);
      #1;
      expected = 2'(a) + 2'(b);
      checks++;
      if ({carry, sum} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b got carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
