// Signed N x N radix-4 modified Booth multiplier (default 8 x 8).
//
// The regular partial-product array turns the multiplicand x and the
// Booth-recoded multiplier w into N/2 rows of 2N bits; a pipelined binary
// tree of adders, whose root is an SPST (spurious power suppression) adder,
// sums them into the 2N-bit two's-complement product. KIND = RIPPLE gives
// the source's proposed multiplier (SPST with conventional ripple adders);
// KIND = LADNER_FISCHER, the default, gives its extension multiplier (SPST
// with the Ladner-Fischer parallel-prefix adder), the one used in the ALU.
//
// Timing: x and w are sampled combinationally by the first tree level; the
// product appears log2(N/2) enabled clock cycles later (2 for N = 8) and is
// held in a register. The pipeline accepts new operands every enabled
// cycle. reset is synchronous and clears the pipeline. The en input, a clock
// enable, is this design's addition so the ALU can run the multiplier at
// its divided clock rate; tie it high to run at the full clock rate. N must
// be even with N/2 a power of two (4, 8, 16, 32, ...). spst_close, the root
// SPST adder's decision, has no load here; it is kept as a named point for
// observing how often the adder's upper part is switched off.
module mbe_multiplier
  import mbe_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter adder_kind_e KIND = LADNER_FISCHER
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           en,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   w,
  output logic [2*N-1:0] product
);
  logic [2*N-1:0] rows [N/2];
  logic           spst_close;

  mbe_pp_array #(.N(N)) u_pp (
    .a   (x),
    .b   (w),
    .rows(rows)
  );

  pp_tree_adder #(.ROWS(N / 2), .W(2 * N), .KIND(KIND)) u_tree (
    .clk  (clk),
    .reset(reset),
    .en   (en),
    .rows (rows),
    .sum  (product),
    .close(spst_close)
  );
endmodule
