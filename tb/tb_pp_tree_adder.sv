// Self-checking testbench for pp_tree_adder with four 16-bit rows (the 8 x 8
// multiplier's size), plus an eight-row, 32-bit ripple-carry instance.
//
// Random rows enter every cycle with en high; the sum must appear exactly
// log2(ROWS) cycles later (2 and 3) and equal the modulo-2^W sum of the rows
// that went in. Stretches with en low must freeze the pipeline, and a
// synchronous reset must clear it. The root SPST adder's close decision is
// counted; with small operands and random ones both values occur.
module tb_pp_tree_adder;
  import mbe_pkg::*;
  logic        clk = 0, reset, en;
  logic [15:0] rows [4];
  logic [15:0] sum;
  logic        close;
  logic [31:0] rows8 [8];
  logic [31:0] sum8;
  logic        close8;
  int checks = 0, failures = 0, n_closed = 0, n_open = 0, cycles = 0;
  logic [15:0] exp_q [$];
  logic [31:0] exp8_q [$];

  pp_tree_adder dut (.clk(clk), .reset(reset), .en(en), .rows(rows), .sum(sum), .close(close));
  pp_tree_adder #(.ROWS(8), .W(32), .KIND(RIPPLE)) dut8 (
    .clk(clk), .reset(reset), .en(en), .rows(rows8), .sum(sum8), .close(close8));

  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    #2_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; en = 1;
    for (int i = 0; i < 4; i++) rows[i] = '0;
    for (int i = 0; i < 8; i++) rows8[i] = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    check(sum == '0 && sum8 == '0, "pipeline not cleared by reset");
    // The pipelines start with zeros in them.
    exp_q  = '{16'h0, 16'h0};
    exp8_q = '{32'h0, 32'h0, 32'h0};
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] e;
      logic [31:0] e8;
      en = (n % 50) < 45;
      e = '0; e8 = '0;
      for (int i = 0; i < 4; i++) begin
        rows[i] = (n % 3 == 0) ? 16'($urandom_range(0, 255)) : 16'($urandom);
        e += rows[i];
      end
      for (int i = 0; i < 8; i++) begin
        rows8[i] = $urandom;
        e8 += rows8[i];
      end
      if (en) begin
        exp_q.push_back(e);
        exp8_q.push_back(e8);
      end
      @(posedge clk);
      #1;
      cycles++;
      if (en) begin
        void'(exp_q.pop_front());
        void'(exp8_q.pop_front());
      end
      check(sum == exp_q[0], $sformatf("4-row sum %h, exp %h (cycle %0d)", sum, exp_q[0], n));
      check(sum8 == exp8_q[0], $sformatf("8-row sum %h, exp %h (cycle %0d)", sum8, exp8_q[0], n));
      if (close) n_closed++; else n_open++;
    end
    // Reset in the middle of a run clears the pipeline.
    reset = 1;
    @(posedge clk);
    #1 reset = 0;
    check(sum == '0 && sum8 == '0, "pipeline not cleared by reset mid-run");
    check(n_closed > 0, "root SPST adder never closed");
    check(n_open > 0, "root SPST adder never open");
    $display("closed=%0d open=%0d", n_closed, n_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
