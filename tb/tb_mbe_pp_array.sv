// Self-checking testbench for mbe_pp_array.
//
// The default 8 x 8 array is checked for every pair of signed operands: the
// N/2 = 4 rows must add up, modulo 2^16, to the signed product, and the
// array must be regular: row i holds no bit below position 2i-1 (2i for row
// 0) and row 0 none above N+2. Rows 0+1 and rows 2+3, the pairs the tree
// adder sums first, must each equal their Booth digits times a, apart from
// the carry bits that cross between the pairs. The extra sign-extension bits of row 0 are
// compared with the new-sign-extension truth table (alpha2..alpha0 =
// {~s0,s0,s0} + d). Instances with N = 4 (exhaustive) and N = 16 (random
// operands) check the generic sizes.
module tb_mbe_pp_array;
  localparam int N = 8;
  logic [N-1:0]    a, b;
  logic [2*N-1:0]  rows [N/2];
  logic [3:0]      a4, b4;
  logic [7:0]      rows4 [2];
  logic [15:0]     a16, b16;
  logic [31:0]     rows16 [8];
  int checks = 0, failures = 0, tally_d = 0;

  mbe_pp_array dut (.a(a), .b(b), .rows(rows));
  mbe_pp_array #(.N(4))  dut4  (.a(a4),  .b(b4),  .rows(rows4));
  mbe_pp_array #(.N(16)) dut16 (.a(a16), .b(b16), .rows(rows16));

  // Booth digit i of b: -2 b(2i+1) + b(2i) + b(2i-1), with b(-1) = 0.
  function automatic int digit(input logic [7:0] bb, input int i);
    int lo;
    lo = (i == 0) ? 0 : int'(bb[2*i-1]);
    return -2 * int'(bb[2*i+1]) + int'(bb[2*i]) + lo;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    #50_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sd;

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        logic [15:0] acc, exp;
        logic s0, dd;
        a = 8'(x); b = 8'(y);
        #1;
        acc = '0;
        for (int i = 0; i < N/2; i++) acc += rows[i];
        exp = 16'(signed'(a) * signed'(b));
        check(acc == exp, $sformatf("8x8 %0d * %0d: rows sum %h, exp %h", signed'(a), signed'(b), acc, exp));
        check(rows[0][15:N+3] == '0, "row 0 wider than N+3 bits");
        for (int i = 1; i < N/2; i++)
          check((rows[i] & ((16'(1) << (2*i-1)) - 16'(1))) == '0, $sformatf("row %0d has bits below 2i-1", i));
        // Independent d: the carry that the last row's p_L1 + c_L produces,
        // from the Booth digit of the top triplet.
        s0 = dut.p[0][N];
        case (b[7:5])
          3'b100:         dd = ~a[0];
          3'b101, 3'b110: dd = ~a[0] & ~a[1];
          default:        dd = 1'b0;
        endcase
        if (dd) tally_d = tally_d + 1;
        // Rows 0+1 and rows 2+3 each hold the exact value of their Booth
        // digits times a, apart from the two bits that cross between the
        // pairs: c_1 (weight 8, moved from row 1 to row 2) and d (weight
        // 256, moved from row 3 to row 0).
        begin
          int e01, e23;
          e01 = int'(signed'(16'(rows[0] + rows[1]))) - (digit(b, 0) + 4 * digit(b, 1)) * int'(signed'(a));
          e23 = int'(signed'(16'(rows[2] + rows[3]))) - (16 * digit(b, 2) + 64 * digit(b, 3)) * int'(signed'(a));
          check(e01 == -e23 && (e01 == 0 || e01 == -8 || e01 == 256 || e01 == 248),
                $sformatf("pair sums off by %0d and %0d", e01, e23));
        end
        sd = (s0 ? 3 : 4) + int'(dd);
        check(rows[0][N+2:N] == 3'(sd), $sformatf("alpha bits %03b, exp %03b", rows[0][N+2:N], 3'(sd)));
      end
    $display("d set in %0d cases", tally_d);
    check(tally_d > 0, "d_i never set");
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        check(8'(rows4[0] + rows4[1]) == 8'(signed'(a4) * signed'(b4)),
              $sformatf("4x4 %0d * %0d", signed'(a4), signed'(b4)));
      end
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] acc;
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (n == 0) begin a16 = 16'h8000; b16 = 16'h8000; end
      if (n == 1) begin a16 = 16'hffff; b16 = 16'h8000; end
      #1;
      acc = '0;
      for (int i = 0; i < 8; i++) acc += rows16[i];
      check(acc == 32'(signed'(a16) * signed'(b16)), $sformatf("16x16 %h * %h", a16, b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
