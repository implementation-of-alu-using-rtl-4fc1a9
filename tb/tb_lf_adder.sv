// Self-checking testbench for lf_adder: the default 16-bit adder gets
// corner cases (carry rippling through all bits) and random operands; a
// 5-bit instance (width not a power of two) is checked exhaustively.
// Expected values are the integer sums.
module tb_lf_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [4:0]   a5, b5, s5;
  logic         c5, co5;
  int checks = 0, failures = 0;

  lf_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  lf_adder #(.W(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  task automatic check16(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d -> %h (exp %h)", x, y, c, {cout, sum}, exp);
    end
  endtask

  initial begin
    #10_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16('1, '0, 1'b1);
    check16('1, 16'h0001, 1'b0);
    check16('1, '1, 1'b1);
    check16(16'h7fff, 16'h0001, 1'b0);
    check16('0, '0, 1'b0);
    for (int k = 0; k < W; k++) check16(W'(1) << k, (W'(1) << k) - W'(1), 1'b1);
    for (int n = 0; n < 20000; n++) check16(W'($urandom), W'($urandom), 1'($urandom));
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x); b5 = 5'(y); c5 = 1'(c);
          #1;
          checks++;
          if ({co5, s5} != 6'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL5 %0d + %0d + %0d -> %0d", x, y, c, {co5, s5});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
