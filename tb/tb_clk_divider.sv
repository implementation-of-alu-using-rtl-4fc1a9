// Self-checking testbench for clk_divider.
//
// For ratios 0..12 and 255 the divided clock must have a period of
// max(ratio, 2) input cycles, stay high for floor(max(ratio,2)/2) of them,
// and tick must be high exactly in the cycle after each rising edge of
// clk_out. With enable low the output must hold and no tick may occur.
// Changing the ratio on the fly must give the new period from the next
// wrap on, and at no point may clk_out rise without a tick. clk_out must
// rise, with a tick, in the first cycle after reset.
module tb_clk_divider;
  logic       clk = 0, rst, enable;
  logic [7:0] div_ratio;
  logic       clk_out, tick;
  int checks = 0, failures = 0;

  clk_divider dut (.clk(clk), .rst(rst), .enable(enable), .div_ratio(div_ratio),
                   .clk_out(clk_out), .tick(tick));

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

  // Observe clk_out for several periods and check period, high time and tick.
  task automatic measure(input int r);
    int eff, rises, hi, t, last_rise, period;
    logic prev;
    eff = (r < 2) ? 2 : r;
    rises = 0; hi = 0; t = 0; last_rise = -1;
    prev = clk_out;
    while (rises < 5) begin
      @(posedge clk);
      #1 t++;
      check(tick == (clk_out && !prev), $sformatf("ratio %0d: tick not aligned with clk_out rise", r));
      if (clk_out && !prev) begin
        if (last_rise >= 0) begin
          period = t - last_rise;
          check(period == eff, $sformatf("ratio %0d: period %0d", r, period));
          check(hi == eff / 2, $sformatf("ratio %0d: high for %0d cycles", r, hi));
        end
        last_rise = t;
        rises++;
        hi = 0;
      end
      if (clk_out) hi++;
      prev = clk_out;
      if (t > 10 * eff + 20) begin
        check(0, $sformatf("ratio %0d: clk_out stopped", r));
        break;
      end
    end
  endtask

  initial begin
    logic held;
    rst = 1; enable = 1; div_ratio = 8'd4;
    repeat (2) @(posedge clk);
    #1 check(clk_out == 0 && tick == 0, "reset state");
    rst = 0;
    for (int r = 0; r <= 12; r++) begin
      div_ratio = 8'(r);
      measure(r);
    end
    // Reset with a ratio of 6: clk_out must rise, with a tick, in the first
    // cycle after reset.
    div_ratio = 8'd6;
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    check(clk_out == 0 && tick == 0, "reset with ratio 6");
    @(posedge clk);
    #1 check(clk_out == 1 && tick == 1, "first cycle after reset: no rise with tick");
    // Ratio raised and lowered at every point of a period: every rise must
    // come with a tick, and no tick without a rise.
    for (int k = 0; k < 40; k++) begin
      logic prev;
      prev = clk_out;
      div_ratio = 8'((k % 2) ? 3 + k % 5 : 9 + k % 4);
      repeat (k % 7 + 1) begin
        @(posedge clk);
        #1 check(tick == (clk_out && !prev), "tick and clk_out rise apart after a ratio change");
        prev = clk_out;
      end
    end
    div_ratio = 8'd255;
    measure(255);
    // Shrink the ratio while the counter is far past the new value.
    div_ratio = 8'd3;
    measure(3);
    // Enable low: output holds, no ticks.
    enable = 0;
    held = clk_out;
    repeat (20) begin
      @(posedge clk);
      #1 check(clk_out == held && tick == 0, "divider moved while disabled");
    end
    enable = 1;
    measure(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
