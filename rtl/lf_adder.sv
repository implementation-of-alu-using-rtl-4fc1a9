// Ladner-Fischer parallel-prefix adder.
//
// Bitwise generate g = a&b and propagate p = a^b feed a prefix tree of
// ceil(log2 W) levels. At level l every bit i whose bit l is set combines its
// group (G,P) with the group ending at the last bit of the lower half-block,
// ((i >> l) << l) - 1, which gives the minimum-depth Ladner-Fischer
// (Sklansky-style) carry tree with fan-out doubling per level. The carry-in
// enters as the generate of a virtual bit -1. The source names this adder
// as the parallel-prefix adder of the extension multiplier; the prefix
// structure above is this design's rendering of it. Purely combinational.
module lf_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g, p, pb;

  always_comb begin
    pb = a ^ b;
    g  = a & b;
    p  = pb;
    // The carry-in is folded into bit 0's generate.
    g[0] = (a[0] & b[0]) | (pb[0] & cin);
    // Prefix levels. At level l the partner J of bit i has bit l clear, so
    // it is not updated in the same level and the in-place update is exact.
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < W; i++) begin
        if (((i >> l) & 1) == 1) begin
          g[i] = g[i] | (p[i] & g[((i >> l) << l) - 1]);
          p[i] = p[i] & p[((i >> l) << l) - 1];
        end
      end
    end
    // g[i] is now the carry out of bit i.
    sum[0] = pb[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = pb[i] ^ g[i-1];
    cout = g[W-1];
  end
endmodule
