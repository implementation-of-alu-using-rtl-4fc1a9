// Self-checking testbench for mbe_multiplier.
//
// Both variants at the default 8 x 8 size, the extension multiplier
// (Ladner-Fischer, the default) and the proposed one (ripple-carry), are
// fed every pair of signed operands back to back, one pair per cycle; each
// product must equal the signed integer product and appear exactly two
// cycles after its operands. Gaps with en low must hold the pipeline. The
// operands of the source's multiplier simulation (x = 11011110,
// w = 10101101) are applied first. A 16 x 16 instance gets random
// operands and must show its three-cycle latency. The root SPST adder's
// close decision is counted; both values must occur.
module tb_mbe_multiplier;
  import mbe_pkg::*;
  logic        clk = 0, reset, en;
  logic [7:0]  x, w;
  logic [15:0] p_lf, p_rc;
  logic [15:0] x16, w16;
  logic [31:0] p16;
  int checks = 0, failures = 0, n_closed = 0, n_open = 0;
  logic [15:0] exp_q [$];
  logic [31:0] exp16_q [$];

  mbe_multiplier dut_lf (.clk(clk), .reset(reset), .en(en), .x(x), .w(w), .product(p_lf));
  mbe_multiplier #(.KIND(RIPPLE)) dut_rc (.clk(clk), .reset(reset), .en(en), .x(x), .w(w), .product(p_rc));
  mbe_multiplier #(.N(16)) dut16 (.clk(clk), .reset(reset), .en(en), .x(x16), .w(w16), .product(p16));

  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  initial begin
    #5_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [7:0] xa, input logic [7:0] wb, input logic e);
    en = e; x = xa; w = wb;
    x16 = 16'($urandom); w16 = 16'($urandom);
    if (e) begin
      exp_q.push_back(16'(signed'(xa) * signed'(wb)));
      exp16_q.push_back(32'(signed'(x16) * signed'(w16)));
    end
    @(posedge clk);
    #1;
    if (e) begin
      void'(exp_q.pop_front());
      void'(exp16_q.pop_front());
    end
    check(p_lf == exp_q[0], $sformatf("LF product %h, exp %h", p_lf, exp_q[0]));
    check(p_rc == exp_q[0], $sformatf("RCA product %h, exp %h", p_rc, exp_q[0]));
    check(p16 == exp16_q[0], $sformatf("16x16 product %h, exp %h", p16, exp16_q[0]));
    if (dut_lf.spst_close) n_closed++; else n_open++;
  endtask

  initial begin
    int lat;
    reset = 1; en = 1; x = '0; w = '0; x16 = '0; w16 = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check(p_lf == '0 && p_rc == '0 && p16 == '0, "reset did not clear the product");
    // Latency of a single product measured directly.
    x = 8'b11011110; w = 8'b10101101; en = 1;
    lat = 0;
    do begin
      @(posedge clk);
      #1 lat++;
    end while (p_lf != 16'(signed'(8'b11011110) * signed'(8'b10101101)) && lat < 10);
    check(lat == 2, $sformatf("8x8 latency %0d cycles, expected 2", lat));
    check(p_rc == p_lf, "variants disagree on the first product");
    x16 = 16'hbeef; w16 = 16'h8001;
    repeat (3) @(posedge clk);
    #1 check(p16 == 32'(signed'(16'hbeef) * signed'(16'h8001)), "16x16 latency is not 3 cycles");
    // Back-to-back operands; the pipelines now hold the last inputs.
    exp_q   = '{16'(signed'(8'b11011110) * signed'(8'b10101101)), 16'(signed'(8'b11011110) * signed'(8'b10101101))};
    x16 = 16'hbeef; w16 = 16'h8001;
    exp16_q = '{32'(signed'(16'hbeef) * signed'(16'h8001)), 32'(signed'(16'hbeef) * signed'(16'h8001)),
                32'(signed'(16'hbeef) * signed'(16'h8001))};
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) step(8'(a), 8'(b), 1'b1);
      if (a % 64 == 0) repeat (3) step(8'($urandom), 8'($urandom), 1'b0);
    end
    check(n_closed > 0, "root SPST adder never closed");
    check(n_open > 0, "root SPST adder never open");
    $display("closed=%0d open=%0d", n_closed, n_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
