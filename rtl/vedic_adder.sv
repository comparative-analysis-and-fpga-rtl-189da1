// vedic_adder: the adder used inside the Vedic multipliers, of either kind.
//
// KIND = ADDER_RCA builds a ripple carry adder (rca) with its carry in tied
// to 0; KIND = ADDER_KSA builds a Kogge-Stone adder (ksa). Ports:
// a, b (WIDTH bits) -> sum (WIDTH bits). Combinational.
// The multipliers size every adder so that its result cannot overflow, which
// is why the carry out is left unused here.
module vedic_adder
  import vedic_pkg::*;
#(
  parameter int unsigned WIDTH = 4,
  parameter adder_kind_e KIND  = ADDER_RCA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  logic cout_unused;

  if (KIND == ADDER_KSA) begin : g_ksa
    ksa #(.WIDTH(WIDTH)) u_ksa (
      .a   (a),
      .b   (b),
      .sum (sum),
      .cout(cout_unused)
    );
  end else begin : g_rca
    rca #(.WIDTH(WIDTH)) u_rca (
      .a   (a),
      .b   (b),
      .cin (1'b0),
      .sum (sum),
      .cout(cout_unused)
    );
  end

endmodule
