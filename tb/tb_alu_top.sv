// End-to-end testbench for alu_top at its default parameters (8-bit
// operands, 8-bit divider ratio); it is also the full-size test.
//
// Operands, operation code and divider ratio are changed at random times,
// not only at ticks, and a synchronous reset is applied in the middle of the
// run. A reference model, stepped at every rising edge of clk_out (the
// ALU's tick), keeps the two-stage multiplier pipeline and the result
// register; every cycle alu_out, product and sum are compared with it. The
// clk_out period is checked against div_ratio while the ratio is steady.
// Events counted, each of which must occur at least once: every operation
// code, a product whose upper half the multiplier's SPST adder switched off
// and one where it did not, a product of two negative operands, an addition
// with carry out, a ratio change, and a reset during operation. The
// operands of the source's ALU simulation (a = 01000101, b = 00100011,
// operation 01) are applied first and their product must show after three
// ticks.
module tb_alu_top;
  import mbe_pkg::*;
  logic        clk = 0, rst;
  logic [7:0]  a, b, div_ratio;
  alu_op_e     operation;
  logic [15:0] alu_out, product;
  logic        clk_out;
  logic [8:0]  sum;

  int checks = 0, failures = 0, cycles = 0;
  int n_op [4];
  int n_closed = 0, n_open = 0, n_negneg = 0, n_carry = 0, n_ratio = 0, n_reset = 0;

  alu_top dut (.clk(clk), .rst(rst), .a(a), .b(b), .operation(operation),
               .div_ratio(div_ratio), .alu_out(alu_out), .clk_out(clk_out),
               .sum(sum), .product(product));

  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycles, what);
    end
  endfunction

  initial begin
    #20_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  logic [15:0] m_p1, m_p2, m_out;
  logic        prev_clk_out;
  int          last_rise, ratio_stable_since;

  function automatic logic [15:0] ref_result(input logic [1:0] op, input logic [7:0] x,
                                             input logic [7:0] y, input logic [15:0] prod);
    case (op)
      2'b00:   return 16'(int'(x) + int'(y));
      2'b01:   return prod;
      2'b10:   return {8'h00, x & y};
      default: return {8'h00, x | y};
    endcase
  endfunction

  // Model update at each clock edge where the tick is high; the tick is the
  // cycle in which clk_out has just risen.
  always @(posedge clk) begin
    if (rst) begin
      m_p1 <= '0; m_p2 <= '0; m_out <= '0;
    end else if (clk_out && !prev_clk_out) begin
      m_out <= ref_result(operation, a, b, m_p2);
      m_p2  <= m_p1;
      m_p1  <= 16'(signed'(a) * signed'(b));
      if (operation == OP_MUL) begin
        if (dut.u_mul.spst_close) n_closed++; else n_open++;
      end
      n_op[operation]++;
    end
    prev_clk_out <= rst ? 1'b0 : clk_out;
  end

  initial begin
    int effr;
    rst = 1; a = 8'b01000101; b = 8'b00100011; operation = OP_MUL; div_ratio = 8'd4;
    prev_clk_out = 0; last_rise = -1; ratio_stable_since = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // The source's example: 69 * 35 shows on alu_out from the third tick.
    begin
      int ticks;
      ticks = 0;
      while (ticks < 3) begin
        @(negedge clk);
        if (clk_out && !prev_clk_out) ticks++;
      end
      @(negedge clk);
      check(alu_out == 16'd2415, $sformatf("69*35 gave %0d", alu_out));
      check(sum == 9'd104, "69+35");
    end
    for (int n = 0; n < 200000; n++) begin
      @(negedge clk);
      cycles++;
      // Compare with the model.
      check(alu_out == m_out, $sformatf("alu_out %h, expected %h (op %0d)", alu_out, m_out, operation));
      check(product == m_p2, $sformatf("product %h, expected %h", product, m_p2));
      check(sum == 9'(int'(a) + int'(b)), "sum");
      if (sum[8]) n_carry++;
      if (a[7] && b[7] && operation == OP_MUL) n_negneg++;
      // Divided clock period.
      effr = (div_ratio < 2) ? 2 : int'(div_ratio);
      if (clk_out && !prev_clk_out) begin
        if (last_rise >= 0 && last_rise > ratio_stable_since)
          check(cycles - last_rise == effr, $sformatf("clk_out period %0d, ratio %0d", cycles - last_rise, effr));
        last_rise = cycles;
      end
      // New stimulus at random times.
      if ($urandom_range(0, 3) == 0) begin
        case ($urandom_range(0, 3))
          0: begin a = 8'($urandom_range(0, 7)) - 8'd4; b = 8'($urandom_range(0, 7)) - 8'd4; end
          1: begin a = 8'($urandom); b = 8'($urandom_range(0, 3)); end
          default: begin a = 8'($urandom); b = 8'($urandom); end
        endcase
      end
      if ($urandom_range(0, 7) == 0) operation = alu_op_e'($urandom_range(0, 3));
      if (n % 5000 == 4999) begin
        div_ratio = 8'($urandom_range(0, 9));
        ratio_stable_since = cycles + 2 * 255;
        n_ratio++;
      end
      if (n == 100000) begin
        rst = 1;
        @(negedge clk);
        cycles++;
        check(alu_out == '0 && product == '0 && clk_out == 0, "reset did not clear the ALU");
        rst = 0;
        last_rise = -1;
        n_reset++;
      end
    end
    for (int k = 0; k < 4; k++) check(n_op[k] > 0, $sformatf("operation %0d never executed", k));
    check(n_closed > 0, "SPST upper part never switched off");
    check(n_open > 0, "SPST upper part never used");
    check(n_negneg > 0, "no product of two negative operands");
    check(n_carry > 0, "no addition with carry out");
    check(n_ratio > 0, "divider ratio never changed");
    check(n_reset > 0, "no reset during operation");
    $display("ops add=%0d mul=%0d and=%0d or=%0d spst_closed=%0d spst_open=%0d ratio_changes=%0d resets=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_closed, n_open, n_ratio, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
