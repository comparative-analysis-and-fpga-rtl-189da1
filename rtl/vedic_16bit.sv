// vedic_16bit: 16x16-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into halves aH:aL and bH:bL of H = 8 bits. Four
// vedic_8bit multipliers form the partial products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (16 bits each)
// and three adders of 16, 24 and 24 bits combine them:
//   q4 = q1 + {0, q0[15:8]}        (16-bit adder)
//   q5 = {0, q2} + {q3, 8'b0}   (24-bit adder)
//   q6 = q5 + {0, q4}              (24-bit adder)
//   mul = {q6, q0[7:0]}
// so the vertical and crosswise partial products are summed column by
// column, and the low 8 bits of q0 pass straight to the result.
// The decomposition, operand pairs and adder widths are the design's; KIND
// picks ripple-carry or Kogge-Stone adders, the two variants the design
// compares (Kogge-Stone by default, the faster one at 8 and 16 bits).
// No adder can overflow, since the product of two 16-bit numbers fits in 32
// bits, so the adders' carry outs are not used.
// Ports: a, b (16 bits) -> mul (32 bits). Combinational, no clock.
module vedic_16bit
  import vedic_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_KSA
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] mul
);

  localparam int unsigned H = 8;          // half width
  localparam int unsigned N = 2 * H;      // operand width
  localparam int unsigned W = N + H;      // width of the two wide adders

  logic [N-1:0] q0, q1, q2, q3, q4;
  logic [N-1:0] temp1;
  logic [W-1:0] temp2, temp3, temp4, q5, q6;

  // partial products
  vedic_8bit #(.KIND(KIND)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .mul(q3));
  vedic_8bit #(.KIND(KIND)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .mul(q2));
  vedic_8bit #(.KIND(KIND)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .mul(q1));
  vedic_8bit #(.KIND(KIND)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .mul(q0));

  // operand alignment
  assign temp1 = {{H{1'b0}}, q0[N-1:H]};
  assign temp2 = {{H{1'b0}}, q2};
  assign temp3 = {q3, {H{1'b0}}};
  assign temp4 = {{H{1'b0}}, q4};

  vedic_adder #(.WIDTH(N), .KIND(KIND)) u_add_q4 (.a(q1),    .b(temp1), .sum(q4));
  vedic_adder #(.WIDTH(W), .KIND(KIND)) u_add_q5 (.a(temp2), .b(temp3), .sum(q5));
  vedic_adder #(.WIDTH(W), .KIND(KIND)) u_add_q6 (.a(q5),    .b(temp4), .sum(q6));

  assign mul = {q6, q0[H-1:0]};

endmodule
