// vedic_2bit: 2x2-bit unsigned multiplier, the leaf of the Vedic multipliers.
//
// Urdhva Tiryagbhyam ("vertically and crosswise") on two bits:
//   mul[0]           = a0 b0                  (vertical, right column)
//   mul[1], c1       = half_add(a1 b0, a0 b1) (crosswise)
//   mul[2], mul[3]   = half_add(a1 b1, c1)    (vertical, left column)
// Four AND gates and two half adders, as the design specifies.
// Ports: a, b (2 bits) -> mul (4 bits). Combinational.
module vedic_2bit (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] mul
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign mul[0] = a0b0;

  half_adder u_ha0 (.a(a1b0), .b(a0b1), .sum(mul[1]), .carry(c1));
  half_adder u_ha1 (.a(a1b1), .b(c1),   .sum(mul[2]), .carry(mul[3]));

endmodule
