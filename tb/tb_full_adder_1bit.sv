// tb_full_adder_1bit: exhaustive self-check of full_adder_1bit.
// All eight input combinations are applied; {cout, sum} is compared with the
// arithmetic sum a + b + cin. A watchdog ends the run if it stalls.
module tb_full_adder_1bit;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  full_adder_1bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expected;
      {a, b, cin} = 3'(v);
      #1;
      expected = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
