// Regular partial-product array of a signed N x N radix-4 Booth multiplier.
//
// The multiplier b is split into N/2 overlapping triplets (b_-1 = 0); each is
// Booth-encoded and selects a row p_i0..p_iN from the multiplicand a
// (a_N = a_(N-1), a_-1 = 0). Conventional MBE would add each negative row's
// +1 as a separate bit and so need an extra row; this array stays at N/2
// rows:
//   * the LSB p_i0 and the +1 (neg_i) of row i are summed in place, giving
//     tau_i0 = one_i & a0 at weight 2i and a carry c_i = neg_i & ~(one_i & a0)
//     at weight 2i+1, which is placed in row i+1 (just right of its LSB);
//   * for the last row (i = N/2-1) there is no next row, so c_i is added to
//     p_i1 directly, giving tau_i1 = one_i & eps | two_i & a0 with
//     eps = a1 ^ (a0 & b2i+1), and the carry d_i of p_i1 + c_i, weight N,
//     which is formed directly from the operands:
//     d_i = b2i+1 & ~a0 & ~((b2i-1 | a1) & (b2i | a1) & (b2i | b2i-1));
//   * d_i is folded into the sign-extension bits ~s0 s0 s0 of row 0 (bits
//     N+2..N) as alpha2 = ~s0 | d_i, alpha1 = s0 & ~d_i, alpha0 = s0 ^ d_i.
// Row 0's compressed sign bits carry an offset of +2^(N+2). Row 1 carries
// ~s1 at bit N+2 and ones above it, its signed value less 2^(N+2); rows 2
// and up carry their sign bit s_i replicated from bit 2i+N to the top. So
// rows 0 and 1 together, and every other row on its own, hold their exact
// two's-complement value: all rows add up to a*b modulo 2^(2N), and so
// does every pair (or aligned group) of rows the tree adder sums first,
// which keeps the upper half of small sums a pure sign pattern for the
// SPST adder.
//
// All of the above follows the source's equations (3)-(5), (7)-(10) and
// Tables II and III and equation (6); the sign-extension form of rows 1 and
// up is this design's choice. Each output row is 2N bits wide, already
// shifted to its weight. Purely combinational.
module mbe_pp_array
  import mbe_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] rows [N/2]
);
  localparam int unsigned R = N / 2;
  localparam int unsigned L = R - 1;   // index of the last row

  if (N < 4 || (N % 2) != 0) begin : g_bad_n
    $error("mbe_pp_array: N must be even and at least 4");
  end

  // Multiplicand extended by one bit on each side: ax[k] = a_(k-1).
  logic [N+1:0] ax;
  // Multiplier with b_-1 = 0 appended: bx[k] = b_(k-1).
  logic [N:0]   bx;

  assign ax = {a[N-1], a, 1'b0};
  assign bx = {b, 1'b0};

  booth_code_t code [R];
  logic [N:0]  p    [R];   // raw selector outputs p_i0..p_iN
  logic        tau0 [R];
  logic        c    [R];

  for (genvar i = 0; i < R; i++) begin : g_row
    mbe_encoder u_enc (.b(bx[2*i+2 -: 3]), .code(code[i]));

    for (genvar j = 0; j <= N; j++) begin : g_bit
      mbe_selector u_sel (
        .code (code[i]),
        .b_msb(b[2*i+1]),
        .a_j  (ax[j+1]),
        .a_jm1(ax[j]),
        .p    (p[i][j])
      );
    end

    // Equations (3) and (4).
    assign tau0[i] = code[i].one & a[0];
    assign c[i]    = code[i].neg & ~(code[i].one & a[0]);
  end

  // Last row: equations (5)-(7).
  logic eps, tau1, d;
  logic s0, alpha0, alpha1, alpha2;

  always_comb begin
    eps    = a[1] ^ (a[0] & b[2*L+1]);
    tau1   = (code[L].one & eps) | (code[L].two & a[0]);
    // Equation (6): d straight from the operand bits, without waiting for
    // c_L and p_L1.
    d      = b[2*L+1] & ~a[0] &
             ~((b[2*L-1] | a[1]) & (b[2*L] | a[1]) & (b[2*L] | b[2*L-1]));
    // Equations (8)-(10): {~s0, s0, s0} + d.
    s0     = p[0][N];
    alpha2 = ~s0 | d;
    alpha1 = s0 & ~d;
    alpha0 = s0 ^ d;
  end

  always_comb begin
    for (int i = 0; i < R; i++) rows[i] = '0;

    // Row 0: tau_00, p_01..p_0(N-1), alpha0..alpha2 at N..N+2.
    rows[0][0] = tau0[0];
    for (int j = 1; j < N; j++) rows[0][j] = p[0][j];
    rows[0][N]   = alpha0;
    rows[0][N+1] = alpha1;
    rows[0][N+2] = alpha2;

    // Rows 1..L: c_(i-1), tau_i0, p_i1..p_i(N-1), then the sign part.
    // Row 1 carries ~s1 and ones up to the top bit, which is its signed
    // value less 2^(N+2) and so cancels row 0's offset; the other rows
    // carry their sign bit replicated to the top (plain sign extension).
    for (int i = 1; i < R; i++) begin
      rows[i][2*i-1] = c[i-1];
      rows[i][2*i]   = tau0[i];
      for (int j = 1; j < N; j++) rows[i][2*i+j] = p[i][j];
      for (int k = 2*i+N; k < 2*N; k++)
        rows[i][k] = (i == 1) ? ((k == 2*i+N) ? ~p[i][N] : 1'b1) : p[i][N];
    end

    // The last row's bit at 2L+1 is tau_L1 instead of p_L1.
    rows[L][2*L+1] = tau1;
  end
endmodule
