// half_adder: adds two bits.
//
// sum = a xor b, carry = a and b. Purely combinational, no clock.
// It is the cell from which the 2-bit Vedic multiplier is built; the gate
// equations are the usual ones, as the text only names the cell.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
