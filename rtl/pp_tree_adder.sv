// Pipelined binary tree adder for the partial-product rows.
//
// ROWS operands (a power of two, at least 2) are summed pairwise, level by
// level: with four rows, A0+A1 and A2+A3 in parallel, then the two sums.
// Each level's sums are registered, so the tree has LEVELS = log2(ROWS)
// register stages and a latency of LEVELS enabled clock cycles; one new set
// of rows can enter every enabled cycle. The single adder of the last level
// is the SPST adder (split at W/2), whose close signal is brought out so
// its activity can be observed; the adders of the other levels are plain
// carry-propagate adders of kind KIND, which is also used inside the SPST
// adder. All sums are modulo 2^W.
//
// The tree shape and the use of one SPST adder in it follow the source; the
// choice of the root as that adder and the register after every level are
// this design's. Registers reset synchronously to zero and only load when en
// is high.
module pp_tree_adder
  import mbe_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned W    = 16,
  parameter adder_kind_e KIND = LADNER_FISCHER
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic         close
);
  localparam int unsigned LEVELS = $clog2(ROWS);

  if (ROWS < 2 || (1 << LEVELS) != ROWS) begin : g_bad_rows
    $error("pp_tree_adder: ROWS must be a power of two, at least 2");
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN  = ROWS >> l;
    localparam int unsigned NOUT = NIN / 2;

    logic [W-1:0] din [NIN];
    logic [W-1:0] s   [NOUT];
    logic [W-1:0] q   [NOUT];

    if (l == 0) begin : g_src
      assign din = rows;
    end else begin : g_src
      assign din = g_lvl[l-1].q;
    end

    for (genvar k = 0; k < NOUT; k++) begin : g_node
      if (l == LEVELS - 1) begin : g_spst
        logic unused_cout, unused_sign, unused_cc;
        spst_adder #(.W(W), .SPLIT(W / 2), .KIND(KIND)) u_add (
          .a        (din[2*k]),
          .b        (din[2*k+1]),
          .cin      (1'b0),
          .sum      (s[k]),
          .cout     (unused_cout),
          .close    (close),
          .sign     (unused_sign),
          .carr_ctrl(unused_cc)
        );
      end else begin : g_cpa
        logic unused_cout;
        cpa_adder #(.W(W), .KIND(KIND)) u_add (
          .a   (din[2*k]),
          .b   (din[2*k+1]),
          .cin (1'b0),
          .sum (s[k]),
          .cout(unused_cout)
        );
      end
    end

    always_ff @(posedge clk) begin
      if (reset) begin
        for (int k = 0; k < NOUT; k++) q[k] <= '0;
      end else if (en) begin
        q <= s;
      end
    end
  end

  assign sum = g_lvl[LEVELS-1].q[0];
endmodule
