// Programmable clock divider.
//
// Divides clk by the run-time ratio div_ratio (values below 2 act as 2):
// clk_out is high for floor(ratio/2) input cycles and low for the rest, so
// its period is exactly ratio input cycles. tick is a one-cycle pulse in the
// clk domain at every rising edge of clk_out; logic that should run at the
// divided rate uses it as a clock enable and stays in the clk domain.
// The ratio can be changed at any time; a counter already past the new
// ratio wraps at once, and the period in which the ratio changes may be
// shortened or stretched. enable low freezes the divider (clk_out holds, no
// ticks). rst is synchronous; clk_out is low during reset and rises on the
// first cycle after it.
//
// The source gives this block's name and ports (clk, enable, rst, clk_out)
// and calls it re-programmable; the counter structure, the div_ratio input
// and the tick output are this design's.
module clk_divider #(
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [DIV_W-1:0] div_ratio,
  output logic             clk_out,
  output logic             tick
);
  logic [DIV_W-1:0] cnt, cnt_nxt, ratio, half;
  logic             wrap, clk_out_nxt;

  always_comb begin
    ratio   = (div_ratio < DIV_W'(2)) ? DIV_W'(2) : div_ratio;
    half    = ratio >> 1;
    wrap    = (cnt >= ratio - DIV_W'(1));
    cnt_nxt = wrap ? '0 : cnt + DIV_W'(1);
    if (cnt_nxt == '0)        clk_out_nxt = 1'b1;
    else if (cnt_nxt >= half) clk_out_nxt = 1'b0;
    else                      clk_out_nxt = clk_out;
  end

  // clk_out rises only when the counter wraps to 0 and falls once the count
  // reaches half; tick is registered from the same rising transition, so
  // the two stay together whatever the ratio does. The counter resets to all ones,
  // which wraps on the first enabled cycle: clk_out rises right away.
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '1;
      clk_out <= 1'b0;
      tick    <= 1'b0;
    end else if (enable) begin
      cnt     <= cnt_nxt;
      clk_out <= clk_out_nxt;
      tick    <= clk_out_nxt & ~clk_out;
    end else begin
      tick    <= 1'b0;
    end
  end

  // A tick is only ever issued in the cycle after clk_out has risen.
  a_tick_on_rise: assert property (@(posedge clk) disable iff (rst) tick |-> clk_out)
    else $error("clk_divider: tick without clk_out high");
endmodule
