// Self-checking testbench for spst_adder at its default size (32 bits, split
// at 16) with Ladner-Fischer sub-adders, plus a ripple-carry instance.
//
// Operands are drawn so that the upper halves are often pure sign patterns
// (all zeros or all ones) and often not. For each vector the sum and carry
// are compared with a + b + cin, close is compared with an independent
// detection (both upper halves all-0 or all-1), and while close is high the
// upper-part adder's gated operands must be zero. The number of vectors
// with the upper part switched off and on is counted; both must occur.
module tb_spst_adder;
  import mbe_pkg::*;
  logic [31:0] a, b, sum, sum_r;
  logic        cin, cout, cout_r, close, close_r, sign, cc, sign_r, cc_r;
  int checks = 0, failures = 0, n_closed = 0, n_open = 0;

  spst_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
                  .close(close), .sign(sign), .carr_ctrl(cc));
  spst_adder #(.KIND(RIPPLE)) dut_r (.a(a), .b(b), .cin(cin), .sum(sum_r), .cout(cout_r),
                  .close(close_r), .sign(sign_r), .carr_ctrl(cc_r));

  function automatic logic [31:0] pick();
    logic [15:0] lo;
    lo = 16'($urandom);
    case ($urandom_range(0, 3))
      0:       return {16'h0000, lo};
      1:       return {16'hffff, lo};
      default: return $urandom;
    endcase
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    #10_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40000; n++) begin
      logic [32:0] exp;
      logic        exp_close;
      a = pick(); b = pick(); cin = 1'($urandom);
      if (n == 0) begin a = '1; b = 32'h0000_0001; cin = 1'b0; end
      if (n == 1) begin a = 32'h0000_ffff; b = 32'h0000_0001; cin = 1'b0; end
      if (n == 2) begin a = 32'hffff_ffff; b = 32'hffff_ffff; cin = 1'b1; end
      #1;
      exp       = {1'b0, a} + {1'b0, b} + 33'(cin);
      exp_close = (a[31:16] == 16'h0 || a[31:16] == 16'hffff) &&
                  (b[31:16] == 16'h0 || b[31:16] == 16'hffff);
      check({cout, sum} == exp, $sformatf("LF %h + %h + %0d -> %h exp %h", a, b, cin, {cout, sum}, exp));
      check({cout_r, sum_r} == exp, $sformatf("RCA %h + %h + %0d -> %h", a, b, cin, {cout_r, sum_r}));
      check(close == exp_close && close_r == exp_close, "close mismatch");
      if (close) begin
        n_closed++;
        check(dut.a_lat == '0 && dut.b_lat == '0 && dut.cin_msp == 1'b0,
              "upper-part adder inputs not gated while closed");
        check(sum[31:17] == {15{sign}} && sum[16] == cc, "sign-extension output mismatch");
      end else begin
        n_open++;
      end
    end
    check(n_closed > 0, "upper part never switched off");
    check(n_open > 0, "upper part never used");
    $display("closed=%0d open=%0d", n_closed, n_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
