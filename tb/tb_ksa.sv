// tb_ksa: self-check of the Kogge-Stone adder (no carry in) at every width the
// multipliers use: 4, 6, 8, 12, 16 and 24 bits, one instance each.
// The 4- and 6-bit instances see every operand pair exhaustively, the others
// directed carry-chain cases (all ones plus one, alternating patterns) and
// random operands. {cout, sum} is compared with the integer sum of the
// operands. A watchdog ends the run if it stalls.
module tb_ksa;
  localparam int NW = 6;
  localparam int WIDTHS [NW] = '{4, 6, 8, 12, 16, 24};

  logic [23:0] a, b;
  logic        cin;  // driven for symmetry with the ripple adder test; ksa has no carry in
  logic [24:0] res [NW];  // {cout, sum} of each instance, zero-extended
  int          checks = 0, failures = 0;

  for (genvar w = 0; w < NW; w++) begin : g_dut
    localparam int unsigned WD = WIDTHS[w];
    logic [WD-1:0] sum;
    logic          cout;
    ksa #(.WIDTH(WD)) dut (
      .a   (a[WD-1:0]),
      .b   (b[WD-1:0]),
      .sum (sum),
      .cout(cout)
    );
    assign res[w] = 25'({cout, sum});
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every instance with the integer sum of its operand slices
  task automatic check_all();
    #1;
    for (int w = 0; w < NW; w++) begin
      logic [24:0] mask, expected;
      mask     = (25'd1 << WIDTHS[w]) - 25'd1;
      expected = 25'(a & 24'(mask)) + 25'(b & 24'(mask)) ;
      checks++;
      if (res[w] !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL width %0d: %h + %h gave %h, expected %h",
                   WIDTHS[w], a & 24'(mask), b & 24'(mask), res[w], expected);
      end
    end
  endtask

  initial begin
    cin = 1'b0;
    // exhaustive over 6-bit operands (covers the 4-bit instance too)
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        for (int c = 0; c < 2; c++) begin
          a   = 24'(x);
          b   = 24'(y);
          cin = 1'(c);
          check_all();
        end
      end
    end
    // longest carry chains
    a = '1; b = 24'd1; cin = 1'b0; check_all();
    a = '1; b = '0;    cin = 1'b1; check_all();
    a = '1; b = '1;    cin = 1'b1; check_all();
    a = 24'haaaaaa; b = 24'h555555; cin = 1'b1; check_all();
    a = 24'h555555; b = 24'h555555; cin = 1'b0; check_all();
    // random operands
    for (int n = 0; n < 20000; n++) begin
      a   = 24'($urandom);
      b   = 24'($urandom);
      cin = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
