// vedic_mul_top: the two 16x16-bit Vedic multipliers the design compares.
//
// Both multipliers are the same Urdhva Tiryagbhyam ("vertically and
// crosswise") tree, 16 -> 8 -> 4 -> 2 bits, four sub-multipliers and three
// adders per level. They differ only in their adders: u_mul_rca uses ripple
// carry adders throughout, u_mul_ksa Kogge-Stone parallel prefix adders.
// Both see the same operands, so the two products must always agree; a
// synthesis run of this top gives the area and delay of each variant.
// Ports: a, b (16-bit unsigned operands) -> mul_rca, mul_ksa (32-bit
// products). Purely combinational: a product is valid one propagation delay
// after the operands change; there is no clock, register or handshake.
// Putting the two variants side by side in one top is this design's choice;
// the multipliers themselves follow the design level by level.
module vedic_mul_top
  import vedic_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] mul_rca,
  output logic [31:0] mul_ksa
);

  vedic_16bit #(.KIND(ADDER_RCA)) u_mul_rca (.a(a), .b(b), .mul(mul_rca));
  vedic_16bit #(.KIND(ADDER_KSA)) u_mul_ksa (.a(a), .b(b), .mul(mul_ksa));

endmodule
