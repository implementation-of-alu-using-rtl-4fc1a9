// Adder with spurious power suppression (SPST).
//
// The W-bit adder is split into a least significant part (LSP, bits
// SPLIT-1..0) and a most significant part (MSP, bits W-1..SPLIT), by default
// 32 bits split between bit 15 and bit 16 as in the source. The LSP adder
// always runs. A detection unit looks at the two MSP operands: when each of
// them is all zeros or all ones (a pure sign extension, the common case for
// small partial sums), it asserts close. Then
//   * the AND-gate "latches" force the MSP adder's operands and carry-in to
//     zero, so the MSP adder does not toggle;
//   * the sign-extension unit produces SUM_MSP directly: its upper W-SPLIT-1
//     bits are all equal to sign and its bit 0 is carr_ctrl;
//   * the carry-out is produced from the operands' sign bits (A_and, B_and)
//     and the LSP carry, bypassing the MSP adder.
// When close is low the MSP adder adds the operands with the LSP carry.
// In both cases {cout, sum} = a + b + cin exactly.
//
// The split, the detection on the two MSP operands, the AND-gate latches,
// the sign-extension unit and the close/sign/carr_ctrl signals follow the
// source. Exactly how sign and carr_ctrl are formed is this design's
// derivation, and the source's separately clocked asserting circuit
// (close_clk) is replaced by a purely combinational decision: the adder has
// no clock. The LSP and MSP sub-adders are ripple-carry or Ladner-Fischer,
// chosen by KIND.
module spst_adder
  import mbe_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned SPLIT = 16,
  parameter adder_kind_e KIND  = LADNER_FISCHER
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         close,
  output logic         sign,
  output logic         carr_ctrl
);
  localparam int unsigned MW = W - SPLIT;

  if (SPLIT < 1 || MW < 2) begin : g_bad_split
    $error("spst_adder: need SPLIT >= 1 and W - SPLIT >= 2");
  end

  // ---------------- LSP adder ----------------
  logic [SPLIT-1:0] sum_lsp;
  logic             cout_lsp;

  cpa_adder #(.W(SPLIT), .KIND(KIND)) u_lsp (
    .a   (a[SPLIT-1:0]),
    .b   (b[SPLIT-1:0]),
    .cin (cin),
    .sum (sum_lsp),
    .cout(cout_lsp)
  );

  // ---------------- detection logic ----------------
  logic [MW-1:0] a_msp, b_msp;
  logic          a_and, a_nor, b_and, b_nor;

  always_comb begin
    a_msp = a[W-1:SPLIT];
    b_msp = b[W-1:SPLIT];
    a_and = &a_msp;
    a_nor = ~|a_msp;
    b_and = &b_msp;
    b_nor = ~|b_msp;
    close = (a_and | a_nor) & (b_and | b_nor);
    // With both MSP operands pure sign patterns (value -a_and and -b_and),
    // A_MSP + B_MSP + cout_lsp is {MW-1 copies of sign, carr_ctrl}.
    sign      = (a_and & b_and) | ((a_and ^ b_and) & ~cout_lsp);
    carr_ctrl = a_and ^ b_and ^ cout_lsp;
  end

  // ---------------- AND-gate latches and MSP adder ----------------
  logic [MW-1:0] a_lat, b_lat, pseudo_sum;
  logic          cin_msp, cout_msp;

  always_comb begin
    a_lat   = a_msp & {MW{~close}};
    b_lat   = b_msp & {MW{~close}};
    cin_msp = cout_lsp & ~close;
  end

  cpa_adder #(.W(MW), .KIND(KIND)) u_msp (
    .a   (a_lat),
    .b   (b_lat),
    .cin (cin_msp),
    .sum (pseudo_sum),
    .cout(cout_msp)
  );

  // ---------------- sign-extension unit and carry out ----------------
  always_comb begin
    if (close) begin
      sum  = {{(MW-1){sign}}, carr_ctrl, sum_lsp};
      cout = (a_and & b_and) | ((a_and | b_and) & cout_lsp);
    end else begin
      sum  = {pseudo_sum, sum_lsp};
      cout = cout_msp;
    end
  end

  // While the upper part is switched off its adder sees only zeros.
  always_comb begin
    a_gated: assert (!close || (a_lat == '0 && b_lat == '0 && !cin_msp))
      else $error("spst_adder: upper-part inputs not gated");
  end
endmodule
