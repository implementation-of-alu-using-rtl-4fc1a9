// Self-checking testbench for rca_adder at its default width of 8 bits:
// every pair of operands with both carry-in values is compared against the
// integer sum (the ALU's 9-bit {cout, sum}).
module tb_rca_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++)
        for (int c = 0; c < 2; c++) begin
          a = W'(x); b = W'(y); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} != (W+1)'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", x, y, c, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
