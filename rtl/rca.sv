// rca: WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full_adder_1bit cells: the carry out of stage i is the
// carry in of stage i+1, the first stage takes cin and the last one gives
// cout, so the carry path (and the delay) grows linearly with WIDTH.
// Ports: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. Combinational.
// The structure follows the 4-bit ripple carry adder of the design; the width
// is a parameter here (4 by default, the size drawn) because the multipliers
// need adders of 4, 6, 8, 12, 16 and 24 bits.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] enters stage i, carry[WIDTH] leaves the last stage
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder_1bit u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
