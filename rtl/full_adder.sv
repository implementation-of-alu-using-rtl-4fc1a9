// One-bit full adder.
//
// Adds the inputs a, b and the carry cin from the next lower bit and gives
// the sum bit and the carry out, exactly as the full-adder truth table:
// sum is the odd parity of the three inputs, cout is their majority.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
