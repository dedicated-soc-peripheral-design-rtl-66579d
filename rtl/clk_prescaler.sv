// clk_prescaler: clock divider producing a one-cycle enable tick.
//
// A down-counter reloads with (prescale - 1) and raises `tick` for one clock
// each time it reaches zero, so `tick` is high one clock in every
// max(prescale,1) clocks. A prescale of 0 is treated as 1 (tick every clock).
// A new prescale value takes effect at the next reload. The divider itself is
// the "Prescale" block of the reference generator and the counters that set
// carrier and reference frequency; its counting scheme is this design's own.
//
// Interface: clk, rst_n (asynchronous assert, active low), prescale, tick.
// Timing: the first tick comes one clock after reset is released.
module clk_prescaler #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] prescale,
  output logic         tick
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= (prescale == '0) ? '0 : prescale - 1'b1;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
