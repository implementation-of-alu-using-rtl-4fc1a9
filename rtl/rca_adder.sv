// Ripple-carry adder built from full-adder cells.
//
// W full adders are chained from bit 0 upwards, each taking the carry of the
// cell below. This is the conventional adder: it serves as the ALU's 8-bit
// addition unit (sum = {cout, sum}, 9 bits) and as the carry-propagate adder
// of the proposed multiplier's tree. Using full-adder cells follows the
// source's full-adder description; the ripple organisation is this design's
// choice. Purely combinational; delay grows linearly with W.
module rca_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
