// Carry-propagate adder with a selectable architecture.
//
// KIND = RIPPLE instantiates the full-adder chain (rca_adder), the
// conventional adder of the proposed multiplier; KIND = LADNER_FISCHER
// instantiates the parallel-prefix adder (lf_adder) of the extension
// multiplier. Both compute {cout, sum} = a + b + cin, combinationally.
module cpa_adder
  import mbe_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter adder_kind_e KIND = LADNER_FISCHER
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == RIPPLE) begin : g_rca
    rca_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_lf
    lf_adder  #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end
endmodule
