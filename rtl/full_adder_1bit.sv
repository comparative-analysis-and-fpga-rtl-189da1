// full_adder_1bit: adds two bits and a carry in.
//
// sum = a xor b xor cin, cout = majority(a, b, cin). Purely combinational.
// It is the stage of the ripple carry adder; the text names the cell only,
// so the gate equations are the textbook ones.
module full_adder_1bit (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
